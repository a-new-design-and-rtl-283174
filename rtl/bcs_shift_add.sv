// Shift and add unit: the binary common subexpressions (BCSs) of the input.
//
// The 3-bit BCSs that need an adder are [1 0 1] = x + x/4, [1 1 0] = x + x/2
// and [1 1 1] = x + x/2 + x/4. They take three adders by reuse of x + x/2:
//   a1 = x + x/2,  a2 = a1 + x/4,  a3 = x + x/4.
// [0 1 1] is a1/2 and [0 0 1], [0 1 0] are shifts of x, so they are wires and
// are not brought out; the PSM multiplexers take only the four values below.
// The unit is shared by every processing element of the filter.
//
// Interface: x is a signed input sample; bcs[c] is the BCS with LUT code c
// (see fir_psm_pkg::bcs_code_e), signed, with two fraction bits so that x/2
// and x/4 are exact; the lowest bits of x and x + x/2 are therefore always
// zero, which is why synthesis finds some output bits constant. Purely
// combinational.
module bcs_shift_add
  import fir_psm_pkg::*;
#(
  parameter int unsigned X_W = 16
) (
  input  logic signed [X_W-1:0]          x,
  output logic signed [X_W+BCS_GROW-1:0] bcs [4]
);

  localparam int unsigned BW = X_W + BCS_GROW;

  logic signed [BW-1:0] x_q, x_half, x_quarter;   // x, x/2, x/4 in quarter units
  logic signed [BW-1:0] a1, a2, a3;

  always_comb begin
    x_q       = BW'(x) <<< BCS_FRAC;
    x_half    = x_q >>> 1;
    x_quarter = x_q >>> 2;
    a1 = x_q + x_half;       // x + x/2
    a2 = a1 + x_quarter;     // x + x/2 + x/4
    a3 = x_q + x_quarter;    // x + x/4
    bcs[BCS_X100] = x_q;
    bcs[BCS_X110] = a1;
    bcs[BCS_X111] = a2;
    bcs[BCS_X101] = a3;
  end

endmodule
