// Self-checking testbench of the PSM final adder unit. Random signed
// operands are applied with every presence code MMMML that the coding uses
// (0 to 5 operands, so Mux8 takes both A2 and op4 and Mux6 every tap of the
// tree) and with both signs; the output must be the sum of the operands
// present, negated when S is set. Of the codes the coding never uses, MMMM
// patterns other than 0000/1000/1100/1110/1111 must give 0, and L must only
// count when MMMM is 1111.
module tb_psm_adder_unit;
  import fir_psm_pkg::*;
  localparam int unsigned W = 34;
  localparam int unsigned OUT_W = W + OPS_GROW;

  logic signed [W-1:0]     op [N_OPS];
  logic        [3:0]       m;
  logic                    l, s;
  logic signed [OUT_W-1:0] y;
  longint exp;
  int checks = 0, failures = 0;
  int seen_n [6];

  psm_adder_unit #(.W(W), .OUT_W(OUT_W)) dut (.op(op), .m(m), .l(l), .s(s), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++) seen_n[k] = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N_OPS; i++) op[i] = W'({$urandom, $urandom});
      for (int code = 0; code < 32; code++) begin
        int nops;
        {m, l} = 5'(code);
        s = 1'($urandom);
        nops = -1;
        // Mux6 decodes MMMM; L matters only through Mux8, i.e. with MMMM = 1111.
        case (m)
          4'b0000: nops = 0;
          4'b1000: nops = 1;
          4'b1100: nops = 2;
          4'b1110: nops = 3;
          4'b1111: nops = l ? 5 : 4;
          default: nops = 0;
        endcase
        exp = 0;
        for (int i = 0; i < N_OPS; i++) if (i < nops) exp += longint'(op[i]);
        if (s) exp = -exp;
        #1;
        checks++;
        if (longint'(y) != exp) begin
          failures++;
          $display("FAIL code=%b s=%0d got=%0d exp=%0d", 5'(code), s, y, exp);
        end
        if (mask_is_prefix(m, l)) seen_n[nops]++;
      end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen_n[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
