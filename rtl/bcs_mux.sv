// Multiplexer unit: one of the 4:1 multiplexers (Mux1..Mux5) of a PSM
// processing element. It picks, by the two-bit LUT code XX of an operand,
// one of the four BCSs that the shared shift and add unit provides:
// 01 -> x, 10 -> x + x/2, 11 -> x + x/4, 00 -> x + x/2 + x/4.
// The codes are those of the PSM coding; the mux is combinational.
module bcs_mux
  import fir_psm_pkg::*;
#(
  parameter int unsigned W = 19
) (
  input  logic signed [W-1:0] bcs [4],
  input  bcs_code_e           sel,
  output logic signed [W-1:0] y
);

  always_comb begin
    unique case (sel)
      BCS_X100: y = bcs[BCS_X100];
      BCS_X110: y = bcs[BCS_X110];
      BCS_X101: y = bcs[BCS_X101];
      BCS_X111: y = bcs[BCS_X111];
      default:  y = '0;
    endcase
  end

endmodule
