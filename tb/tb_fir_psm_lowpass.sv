// Workload testbench: the 20-tap, 16-bit-coefficient filter configured in
// turn as four lowpass filters, one per band specification
// (wp, ws) = (0.1, 0.12), (0.15, 0.25), (0.2, 0.22), (0.2, 0.3) * pi.
//
// Coefficients are a Hamming-windowed sinc with cutoff (wp + ws) / 2 and unit
// DC gain, quantised to 16 bits (H = round(|h| * 2^15)), coded into the LUT
// and loaded through the configuration port. For each filter a passband tone
// (wp / 2) and a stopband tone (0.9 pi) of amplitude 20000 are streamed.
// Every output is compared exactly with the convolution 4 * sum x[n-k] * H_k,
// and the settled gains must be those of a lowpass filter: at least 0.8 in
// the passband and below 0.002 at 0.9 pi.
module tb_fir_psm_lowpass;
  import fir_psm_pkg::*;
  import psm_coder_pkg::*;
  localparam int unsigned TAPS  = 20;
  localparam int unsigned X_W   = 16;
  localparam int unsigned AW    = $clog2(2*TAPS);
  localparam int unsigned ACC_W = X_W + BCS_GROW + MAX_SHR + OPS_GROW + $clog2(TAPS);
  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = 20000.0;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    cfg_we = 1'b0;
  logic [AW-1:0]           cfg_addr = '0;
  logic [ROW_W-1:0]        cfg_wdata = '0;
  logic                    x_valid = 1'b0;
  logic signed [X_W-1:0]   x_in = '0;
  logic                    y_valid;
  logic signed [ACC_W-1:0] y_out;

  fir_psm_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .x_valid(x_valid), .x_in(x_in),
    .y_valid(y_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint coef [TAPS];
  longint xh [TAPS];              // last TAPS samples, newest first
  real    wp_tab [4] = '{0.1, 0.15, 0.2, 0.2};
  real    ws_tab [4] = '{0.12, 0.25, 0.22, 0.3};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_lowpass(real wp, real ws);
    real h [TAPS];
    real wc, m, sum, t;
    logic [15:0] hq;
    coded_t c;
    wc = (wp + ws) / 2.0 * PI;
    m = (TAPS - 1) / 2.0;
    sum = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      t = n - m;
      h[n] = (0.54 - 0.46 * $cos(2.0 * PI * n / (TAPS - 1))) * $sin(wc * t) / (PI * t);
      sum += h[n];
    end
    for (int n = 0; n < TAPS; n++) begin
      h[n] = h[n] / sum;
      hq = 16'($rtoi((h[n] < 0.0 ? -h[n] : h[n]) * 32768.0 + 0.5));
      c = encode(hq, h[n] < 0.0);
      checks++;
      if (!c.ok) begin
        failures++;
        $display("FAIL coefficient %0d needs more than five operands", n);
      end
      coef[n] = (h[n] < 0.0) ? -longint'(hq) : longint'(hq);
      for (int r = 0; r < 2; r++) begin
        @(negedge clk);
        x_valid = 1'b0;
        cfg_we = 1'b1;
        cfg_addr = AW'(2 * n + r);
        cfg_wdata = (r == 0) ? c.row1 : c.row2;
      end
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Stream a tone of frequency w * pi; return the settled peak gain.
  task automatic tone(real w, output real gain);
    longint exp;
    real peak = 0.0;
    for (int k = 0; k < TAPS; k++) xh[k] = 0;
    for (int n = 0; n < 240; n++) begin
      @(negedge clk);
      x_valid = 1'b1;
      x_in = X_W'($rtoi(AMP * $sin(w * PI * n) + (AMP * $sin(w * PI * n) < 0.0 ? -0.5 : 0.5)));
      for (int k = TAPS - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = longint'(x_in);
      exp = 0;
      for (int k = 0; k < TAPS; k++) exp += 4 * xh[k] * coef[k];
      @(posedge clk);
      #1;
      // The first TAPS outputs still hold sums of the previous stream.
      if (n >= TAPS) begin
        checks++;
        if (!y_valid || longint'(y_out) != exp) begin
          failures++;
          $display("FAIL n=%0d y_out=%0d exp=%0d", n, y_out, exp);
        end
        if ($itor(y_out) > peak) peak = $itor(y_out);
        if (-$itor(y_out) > peak) peak = -$itor(y_out);
      end
    end
    gain = peak / (AMP * 4.0 * 32768.0);
  endtask

  initial begin
    real gp, gs;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      load_lowpass(wp_tab[f], ws_tab[f]);
      tone(wp_tab[f] / 2.0, gp);
      tone(0.9, gs);
      $display("filter %0d (wp=%0.2f pi, ws=%0.2f pi): passband gain %0.4f, gain at 0.9 pi %0.6f",
               f + 1, wp_tab[f], ws_tab[f], gp, gs);
      checks++;
      if (gp < 0.8 || gp > 1.05) begin failures++; $display("FAIL passband gain"); end
      checks++;
      if (gs > 0.002) begin failures++; $display("FAIL stopband gain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
