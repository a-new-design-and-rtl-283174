// Self-checking testbench of the 4:1 BCS multiplexer: with four distinct
// random inputs it checks, for every code XX, that the input of that code
// (01 x, 10 x+x/2, 11 x+x/4, 00 x+x/2+x/4) reaches the output.
module tb_bcs_mux;
  import fir_psm_pkg::*;
  localparam int unsigned W = 19;

  logic signed [W-1:0] bcs [4];
  bcs_code_e           sel;
  logic signed [W-1:0] y;
  logic signed [W-1:0] val_x, val_x110, val_x101, val_x111, exp;
  int checks = 0, failures = 0;

  bcs_mux #(.W(W)) dut (.bcs(bcs), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      val_x    = W'($urandom);
      val_x110 = val_x + 19'sd1;
      val_x101 = val_x + 19'sd2;
      val_x111 = val_x + 19'sd3;
      bcs[2'b01] = val_x;
      bcs[2'b10] = val_x110;
      bcs[2'b11] = val_x101;
      bcs[2'b00] = val_x111;
      for (int c = 0; c < 4; c++) begin
        sel = bcs_code_e'(c);
        case (c)
          1: exp = val_x;
          2: exp = val_x110;
          3: exp = val_x101;
          default: exp = val_x111;
        endcase
        #1;
        checks++;
        if (y != exp) begin
          failures++;
          $display("FAIL sel=%0d got=%0d exp=%0d", c, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
