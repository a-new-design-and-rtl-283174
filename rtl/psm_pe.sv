// PSM processing element: one coefficient multiplier of the multiplier block.
//
// The coefficient is held in two LUT rows (see fir_psm_pkg). For each of the
// five operands a 4:1 multiplexer (Mux1..Mux5) picks one BCS of the shared
// shift and add unit by its code XX, and a programmable shifter scales it by
// 2^-DDDD. The final adder unit sums the operands present (MMMML) and applies
// the sign S. A coefficient of bits h_0..h_15 with weights 2^0..2^-15 so
// gives p = h * x exactly: p is signed, with 2 + 15 = 17 fraction bits
// (p = 4 * x * H for the 16-bit integer H = h * 2^15).
// Combinational: p follows bcs and the rows in the same cycle.
module psm_pe
  import fir_psm_pkg::*;
#(
  parameter int unsigned X_W = 16
) (
  input  logic signed [X_W+BCS_GROW-1:0]                   bcs [4],
  input  lut_row1_t                                        row1,
  input  lut_row2_t                                        row2,
  output logic signed [X_W+BCS_GROW+MAX_SHR+OPS_GROW-1:0]  p
);

  localparam int unsigned BW = X_W + BCS_GROW;
  localparam int unsigned OW = BW + MAX_SHR;

  operand_t             opcode [N_OPS];
  logic signed [BW-1:0] sel    [N_OPS];
  logic signed [OW-1:0] shifted[N_OPS];

  assign opcode[0] = row1.op1;
  assign opcode[1] = row1.op2;
  assign opcode[2] = row2.op3;
  assign opcode[3] = row2.op4;
  assign opcode[4] = row2.op5;

  for (genvar i = 0; i < N_OPS; i++) begin : g_op
    bcs_mux #(.W(BW)) u_mux (
      .bcs (bcs),
      .sel (opcode[i].xx),
      .y   (sel[i])
    );
    prog_shifter #(.IN_W(BW)) u_shr (
      .din   (sel[i]),
      .shift (opcode[i].d),
      .dout  (shifted[i])
    );
  end

  psm_adder_unit #(.W(OW), .OUT_W(OW + OPS_GROW)) u_add (
    .op (shifted),
    .m  (row1.m),
    .l  (row1.l),
    .s  (row1.s),
    .y  (p)
  );

endmodule
