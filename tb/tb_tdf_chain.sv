// Self-checking testbench of the transposed direct-form chain. Random
// products are applied to every tap with a random sample enable. After each
// enabled clock the output must equal sum_k p_(n-k)[k] over the products of
// the last TAPS samples (zero before reset ended), i.e. appear one clock after
// its sample; with the enable low the output must hold.
module tb_tdf_chain;
  localparam int unsigned TAPS  = 20;
  localparam int unsigned P_W   = 37;
  localparam int unsigned ACC_W = P_W + $clog2(TAPS);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [P_W-1:0]   p [TAPS];
  logic signed [ACC_W-1:0] y;
  longint hist [$];            // hist[j*TAPS + k]: product of tap k, j samples ago
  int checks = 0, failures = 0, holds = 0;

  tdf_chain #(.TAPS(TAPS), .P_W(P_W), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .p(p), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp, last;
    for (int k = 0; k < TAPS; k++) p[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      for (int k = 0; k < TAPS; k++) p[k] = P_W'({$urandom, $urandom});
      if (en) for (int k = TAPS - 1; k >= 0; k--) hist.push_front(longint'(p[k]));
      while (hist.size() > TAPS * TAPS) void'(hist.pop_back());
      @(posedge clk);
      #1;
      if (en) begin
        exp = 0;
        for (int j = 0; j < TAPS; j++)
          if ((j * TAPS + j) < hist.size()) exp += hist[j * TAPS + j];
      end else begin
        exp = last;
        holds++;
      end
      checks++;
      if (longint'(y) != exp) begin
        failures++;
        $display("FAIL n=%0d got=%0d exp=%0d", n, y, exp);
      end
      last = longint'(y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
