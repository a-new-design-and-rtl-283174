// Shared constants and types of the programmable-shifts-method (PSM) FIR filter.
//
// A coefficient is coded as up to five operands. Each operand is one binary
// common subexpression (BCS) of the input, picked by a two-bit code XX, and a
// right shift DDDD of 0..15. The code occupies two 18-bit LUT rows:
//   row 1: S DDDD XX DDDD XX MMMML   (sign, operands 1-2, presence flags)
//   row 2: DDDD XX DDDD XX DDDD XX   (operands 3-5)
// The row layout, the XX codes and the five-operand limit are those of the
// method; the fixed-point widths below are this design's choice.
package fir_psm_pkg;

  // BCS codes (field XX of an operand)
  typedef enum logic [1:0] {
    BCS_X111 = 2'b00,   // x + x/2 + x/4   (pattern 1 1 1)
    BCS_X100 = 2'b01,   // x               (pattern 1 0 0, an unpaired bit)
    BCS_X110 = 2'b10,   // x + x/2         (pattern 1 1 0)
    BCS_X101 = 2'b11    // x + x/4         (pattern 1 0 1)
  } bcs_code_e;

  localparam int unsigned N_OPS    = 5;   // operands (= multiplexers) per coefficient
  localparam int unsigned SHIFT_W  = 4;   // DDDD
  localparam int unsigned MAX_SHR  = 15;  // largest right shift, 2^-15
  localparam int unsigned ROW_W    = 18;  // LUT row width
  localparam int unsigned BCS_FRAC = 2;   // fraction bits of a BCS (x/4 is exact)
  localparam int unsigned BCS_GROW = 3;   // BCS width = input width + 3 (1 integer + 2 fraction bits)
  localparam int unsigned OPS_GROW = 3;   // sum of five operands needs 3 more bits

  typedef struct packed {
    logic [SHIFT_W-1:0] d;    // right shift, weight 2^-d
    bcs_code_e          xx;   // which BCS
  } operand_t;

  typedef struct packed {
    logic       s;            // 1: negative coefficient
    operand_t   op1;
    operand_t   op2;
    logic [3:0] m;            // MMMM: operands 1..4 present (MSB = operand 1)
    logic       l;            // L: operand 5 present
  } lut_row1_t;

  typedef struct packed {
    operand_t op3;
    operand_t op4;
    operand_t op5;
  } lut_row2_t;

  // Width of one shifted operand, and of a whole product, for an input width xw.
  function automatic int unsigned bcs_w(int unsigned xw);
    return xw + BCS_GROW;
  endfunction

  function automatic int unsigned op_w(int unsigned xw);
    return xw + BCS_GROW + MAX_SHR;
  endfunction

  function automatic int unsigned prod_w(int unsigned xw);
    return xw + BCS_GROW + MAX_SHR + OPS_GROW;
  endfunction

  // A presence code is legal when the operands present form a prefix 1..n.
  function automatic logic mask_is_prefix(logic [3:0] m, logic l);
    case ({m, l})
      5'b00000, 5'b10000, 5'b11000, 5'b11100, 5'b11110, 5'b11111: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

endpackage
