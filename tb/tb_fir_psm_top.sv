// End-to-end self-checking testbench of the PSM FIR filter at its default
// size (20 taps, 16-bit input, 16-bit coefficients).
//
// Coefficient sets are coded with the BCSE-style coder of psm_coder_pkg and
// loaded through the configuration port, row by row. Random samples are then
// streamed with gaps in x_valid. The reference is the transposed-form
// convolution y[n] = 4 * sum_k x[n-k] * H_k, where H_k is the coefficient of
// tap k at the time sample n-k entered (the filter may be reloaded while its
// delays still hold sums). Every output must appear exactly one clock after
// its sample. The run covers five sets: 16-bit, 12-bit and 8-bit coefficient
// word lengths, one set with the worked example coefficient and zeros, and a
// reload while samples are in flight. It counts, and requires at least once:
// each operand count 0..5 (Mux6 taps, Mux8 both ways), negative coefficients
// (Mux7), each word length, a reconfiguration, and idle cycles.
module tb_fir_psm_top;
  import fir_psm_pkg::*;
  import psm_coder_pkg::*;
  localparam int unsigned TAPS  = 20;
  localparam int unsigned X_W   = 16;
  localparam int unsigned AW    = $clog2(2*TAPS);
  localparam int unsigned ACC_W = X_W + BCS_GROW + MAX_SHR + OPS_GROW + $clog2(TAPS);

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
  int seen_nops [6];
  int n_negative = 0, n_reconfig = 0, n_idle = 0, n_inflight_reload = 0;
  int n_wl [3];                    // word lengths 16, 12, 8
  longint coef [TAPS];             // current signed coefficients H_k
  longint prod_hist [$];           // per sample, TAPS products x*H_k (newest first)
  longint exp_y;
  bit     exp_pending = 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load one coefficient set; mode 0/1/2 = 16/12/8-bit word length, 3 = example set.
  task automatic load_set(int mode);
    logic [15:0] h;
    bit neg;
    coded_t c;
    for (int k = 0; k < TAPS; k++) begin
      do begin
        h = 16'($urandom) & 16'h7fff;
        if (mode == 1) h &= 16'hfff0;
        if (mode == 2) h &= 16'hff00;
        if (mode == 3) begin
          if (k == 0) h = 16'b1010011001010011;
          else if (k % 5 == 1) h = 16'h0000;
          else if (k % 5 == 2) h = 16'h4924;   // five unpaired bits
        end
        neg = 1'($urandom);
        c = encode(h, neg);
      end while (!c.ok);
      coef[k] = neg ? -longint'(h) : longint'(h);
      seen_nops[c.nops]++;
      if (neg && h != 0) n_negative++;
      for (int r = 0; r < 2; r++) begin
        @(negedge clk);
        x_valid = 1'b0;
        cfg_we = 1'b1;
        cfg_addr = AW'(2 * k + r);
        cfg_wdata = (r == 0) ? c.row1 : c.row2;
      end
    end
    @(negedge clk);
    cfg_we = 1'b0;
    if (mode < 3) n_wl[mode]++;
    n_reconfig++;
  endtask

  // One clock: maybe a sample; check the output of the previous clock.
  task automatic step(bit valid);
    @(negedge clk);
    x_valid = valid;
    x_in = X_W'($urandom);
    if ($urandom_range(20) == 0) x_in = 16'sh8000;
    if (valid) begin
      for (int k = TAPS - 1; k >= 0; k--) prod_hist.push_front(longint'(x_in) * coef[k]);
      while (prod_hist.size() > TAPS * TAPS) void'(prod_hist.pop_back());
      exp_y = 0;
      for (int j = 0; j < TAPS; j++)
        if (j * TAPS + j < prod_hist.size()) exp_y += 4 * prod_hist[j * TAPS + j];
    end else begin
      n_idle++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (y_valid != valid) begin
      failures++;
      $display("FAIL y_valid=%0d one clock after x_valid=%0d", y_valid, valid);
    end
    if (valid) begin
      checks++;
      if (longint'(y_out) != exp_y) begin
        failures++;
        $display("FAIL y_out=%0d exp=%0d after load %0d", y_out, exp_y, n_reconfig);
      end
    end
  endtask

  task automatic stream(int n);
    for (int i = 0; i < n; i++) step($urandom_range(4) != 0);
  endtask

  initial begin
    for (int k = 0; k < 6; k++) seen_nops[k] = 0;
    for (int k = 0; k < 3; k++) n_wl[k] = 0;
    for (int k = 0; k < TAPS; k++) coef[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Before any load every coefficient is zero.
    stream(5);
    load_set(0); stream(200);
    load_set(1); stream(200);
    load_set(2); stream(200);
    load_set(3); stream(200);
    // Reload while the delays hold sums of the previous set.
    n_inflight_reload++;
    load_set(0); stream(200);

    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen_nops[k] == 0) begin failures++; $display("FAIL no coefficient with %0d operands", k); end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_wl[k] == 0) begin failures++; $display("FAIL word length %0d never used", k); end
    end
    checks++; if (n_negative == 0) begin failures++; $display("FAIL no negative coefficient"); end
    checks++; if (n_reconfig < 2) begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_idle == 0) begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_inflight_reload == 0) begin failures++; $display("FAIL no reload in flight"); end
    $display("operand counts 0..5: %0d %0d %0d %0d %0d %0d; negative %0d; loads %0d; idle %0d",
             seen_nops[0], seen_nops[1], seen_nops[2], seen_nops[3], seen_nops[4], seen_nops[5],
             n_negative, n_reconfig, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
