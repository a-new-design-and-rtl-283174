// Programmable shifter (PS) of the final shifter unit.
//
// Scales the selected BCS by 2^-D, where D (0..15) is the DDDD field of the
// operand in the LUT, i.e. it places the subexpression at its bit position in
// the coefficient. The output carries 15 more fraction bits than the input,
// so the arithmetic right shift loses nothing (an exact product is this
// design's choice). Combinational.
module prog_shifter
  import fir_psm_pkg::*;
#(
  parameter int unsigned IN_W = 19
) (
  input  logic signed [IN_W-1:0]         din,
  input  logic        [SHIFT_W-1:0]      shift,
  output logic signed [IN_W+MAX_SHR-1:0] dout
);

  localparam int unsigned OW = IN_W + MAX_SHR;

  always_comb begin
    dout = (OW'(din) <<< MAX_SHR) >>> shift;
  end

endmodule
