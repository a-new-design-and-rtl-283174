// Final adder unit of a PSM processing element, with its bypass and sign
// multiplexers.
//
// Up to five shifted operands op[0..4] (operands 1..5) are summed by four
// adders:  A1 = op1 + op2,  A2 = op4 + op5,  A3 = A1 + op3,  A4 = A3 + Mux8,
// where Mux8 = L ? A2 : op4. Mux6 then takes, by MMMM, the point of the tree
// that holds exactly the operands present:
//   MMMM 1000 -> op1, 1100 -> A1, 1110 -> A3, 1111 -> A4, 0000 -> 0.
// A coefficient with few operands so leaves the later adders without a load.
// Mux7 negates the sum (two's complement) when the sign bit S is set.
// The roles of Mux6, Mux7, Mux8 and of the codes 11111, 11110 and 10000 are
// those of the PSM; the exact adder wiring and the decode of the other codes
// are this design's reading. Codes that are not a prefix of operands are not
// used by the coding; they give 0.
// Combinational; op entries are W bits, y is OUT_W bits, all signed.
module psm_adder_unit
  import fir_psm_pkg::*;
#(
  parameter int unsigned W     = 34,
  parameter int unsigned OUT_W = W + OPS_GROW
) (
  input  logic signed [W-1:0]     op [N_OPS],
  input  logic        [3:0]       m,
  input  logic                    l,
  input  logic                    s,
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] a1, a2, a3, a4, mux8, mux6;

  always_comb begin
    a1   = OUT_W'(op[0]) + OUT_W'(op[1]);
    a2   = OUT_W'(op[3]) + OUT_W'(op[4]);
    mux8 = l ? a2 : OUT_W'(op[3]);
    a3   = a1 + OUT_W'(op[2]);
    a4   = a3 + mux8;
    case (m)
      4'b1000: mux6 = OUT_W'(op[0]);
      4'b1100: mux6 = a1;
      4'b1110: mux6 = a3;
      4'b1111: mux6 = a4;
      default: mux6 = '0;
    endcase
    y = s ? -mux6 : mux6;     // Mux7
  end

endmodule
