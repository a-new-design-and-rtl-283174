// Self-checking testbench of the PSM processing element, driven through the
// shared shift and add unit. It first checks that the coder reproduces the
// two LUT rows of the worked example h = 1010011001010011 and that the PE
// multiplies by it. Then random 16-bit coefficients of both signs (those
// that fit in five operands) are coded, applied with random inputs, and the
// PE output is compared with 4 * x * H. Every operand count 0..5 must occur.
module tb_psm_pe;
  import fir_psm_pkg::*;
  import psm_coder_pkg::*;
  localparam int unsigned X_W = 16;
  localparam int unsigned P_W = X_W + BCS_GROW + MAX_SHR + OPS_GROW;

  logic signed [X_W-1:0]          x;
  logic signed [X_W+BCS_GROW-1:0] bcs [4];
  lut_row1_t                      row1;
  lut_row2_t                      row2;
  logic signed [P_W-1:0]          p;
  int checks = 0, failures = 0;
  int seen_n [6];

  bcs_shift_add #(.X_W(X_W)) u_sau (.x(x), .bcs(bcs));
  psm_pe #(.X_W(X_W)) dut (.bcs(bcs), .row1(row1), .row2(row2), .p(p));

  task automatic apply(logic [15:0] h, bit neg, logic signed [X_W-1:0] xv);
    coded_t c;
    longint exp;
    c = encode(h, neg);
    if (!c.ok) return;
    row1 = lut_row1_t'(c.row1);
    row2 = lut_row2_t'(c.row2);
    x = xv;
    #1;
    exp = ref_prod(h, neg, int'(xv));
    checks++;
    if (longint'(p) != exp) begin
      failures++;
      $display("FAIL h=%b neg=%0d x=%0d got=%0d exp=%0d", h, neg, xv, p, exp);
    end
    seen_n[c.nops]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coded_t ex;
    for (int k = 0; k < 6; k++) seen_n[k] = 0;
    ex = encode(16'b1010011001010011, 1'b0);
    checks++;
    if (ex.row1 != 18'b000001101011011110 || ex.row2 != 18'b100111111010000000 || ex.nops != 4) begin
      failures++;
      $display("FAIL coder example: %b %b", ex.row1, ex.row2);
    end
    apply(16'b1010011001010011, 1'b0, 16'sd1000);
    apply(16'b1010011001010011, 1'b1, -16'sd32768);
    apply(16'h0000, 1'b0, 16'sd1234);
    apply(16'hffff, 1'b0, 16'sd1);        // needs six operands: skipped by apply
    apply(16'h7fff, 1'b1, 16'sh7fff);
    apply(16'h4924, 1'b0, -16'sd32768);   // five unpaired bits
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] h;
      h = 16'($urandom);
      if (n % 4 == 0) h = h & 16'hff00;       // 8-bit word length
      else if (n % 4 == 1) h = h & 16'hfff0;  // 12-bit word length
      apply(h, 1'($urandom), X_W'($urandom));
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen_n[k] == 0) begin
        failures++;
        $display("FAIL operand count %0d never applied", k);
      end
    end
    $display("operand counts 0..5: %0d %0d %0d %0d %0d %0d",
             seen_n[0], seen_n[1], seen_n[2], seen_n[3], seen_n[4], seen_n[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
