// Self-checking testbench of the BCS shift and add unit: for random and
// extreme inputs it compares the four subexpressions with 4x, 6x, 5x and 7x
// (quarter units), computed here by integer multiplication.
module tb_bcs_shift_add;
  import fir_psm_pkg::*;
  localparam int unsigned X_W = 16;

  logic signed [X_W-1:0]          x;
  logic signed [X_W+BCS_GROW-1:0] bcs [4];
  int checks = 0, failures = 0;

  bcs_shift_add #(.X_W(X_W)) dut (.x(x), .bcs(bcs));

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%0d got=%0d exp=%0d", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: x = 16'sh7fff;
        1: x = 16'sh8000;
        2: x = 0;
        3: x = -1;
        default: x = X_W'($urandom);
      endcase
      #1;
      check(int'(bcs[BCS_X100]), 4 * int'(x), "x");
      check(int'(bcs[BCS_X110]), 6 * int'(x), "x+x/2");
      check(int'(bcs[BCS_X101]), 5 * int'(x), "x+x/4");
      check(int'(bcs[BCS_X111]), 7 * int'(x), "x+x/2+x/4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
