// Testbench helper: codes a 16-bit binary coefficient into the two PSM LUT
// rows, and gives the exact reference product.
//
// The coefficient is H * 2^-15 for an unsigned 16-bit H (bit 15 has weight
// 2^0, bit 0 weight 2^-15) and a separate sign. The coder scans the bits from
// the most significant one down. At each 1 it looks at the 3-bit window that
// starts there: 111, 110 and 101 become one operand x+x/2+x/4, x+x/2 or x+x/4
// and consume the window's ones; 100 becomes the unpaired operand x. The
// operand's shift is the position of its first bit. This greedy grouping
// takes at most five operands whenever bit 15 is clear (|h| < 1), and a sixth
// may be needed otherwise; encode() then reports failure.
package psm_coder_pkg;

  typedef struct {
    logic [17:0] row1;
    logic [17:0] row2;
    int          nops;
    bit          ok;
  } coded_t;

  function automatic coded_t encode(logic [15:0] h, bit neg);
    coded_t       c;
    logic [5:0]   opf [5];
    int           n = 0;
    int           i = 0;
    logic [2:0]   w;
    logic [1:0]   xx;
    int           adv;
    logic [4:0]   mask;
    for (int k = 0; k < 5; k++) opf[k] = 6'b0;
    c.ok = 1'b1;
    while (i < 16) begin
      w[2] = h[15-i];
      w[1] = (i + 1 < 16) ? h[15-(i+1)] : 1'b0;
      w[0] = (i + 2 < 16) ? h[15-(i+2)] : 1'b0;
      if (!w[2]) begin
        i++;
        continue;
      end
      case (w)
        3'b111: begin xx = 2'b00; adv = 3; end
        3'b110: begin xx = 2'b10; adv = 2; end
        3'b101: begin xx = 2'b11; adv = 3; end
        default: begin xx = 2'b01; adv = 1; end
      endcase
      if (n < 5) opf[n] = {4'(i), xx};
      else c.ok = 1'b0;
      n++;
      i += adv;
    end
    mask = 5'b0;
    for (int k = 0; k < 5; k++) if (k < n) mask[4-k] = 1'b1;
    c.nops = n;
    c.row1 = {neg, opf[0], opf[1], mask};
    c.row2 = {opf[2], opf[3], opf[4]};
    return c;
  endfunction

  // Reference product of the PE: h * x with 17 fraction bits.
  function automatic longint ref_prod(logic [15:0] h, bit neg, int x);
    longint p = 4 * longint'(x) * longint'(h);
    return neg ? -p : p;
  endfunction

endpackage
