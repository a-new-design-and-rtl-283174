// Self-checking testbench of the programmable shifter: for random signed
// inputs and every shift 0..15 the output must equal din * 2^(15 - shift),
// i.e. din * 2^-shift with 15 fraction bits, computed by multiplication.
module tb_prog_shifter;
  import fir_psm_pkg::*;
  localparam int unsigned IN_W = 19;

  logic signed [IN_W-1:0]         din;
  logic        [SHIFT_W-1:0]      shift;
  logic signed [IN_W+MAX_SHR-1:0] dout;
  longint exp;
  int checks = 0, failures = 0;

  prog_shifter #(.IN_W(IN_W)) dut (.din(din), .shift(shift), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      din = (n == 0) ? -19'sd1 : (n == 1) ? 19'sh40000 : IN_W'($urandom);
      for (int s = 0; s < 16; s++) begin
        shift = 4'(s);
        #1;
        exp = longint'(din) * (64'sd1 <<< (15 - s));
        checks++;
        if (longint'(dout) != exp) begin
          failures++;
          $display("FAIL din=%0d shift=%0d got=%0d exp=%0d", din, s, dout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
