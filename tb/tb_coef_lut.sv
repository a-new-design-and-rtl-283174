// Self-checking testbench of the coefficient LUT: after reset every row must
// read 0; rows written one per clock must read back from the next clock on,
// with no other row disturbed; writes to addresses past the table must be
// ignored. Even rows are written with legal presence codes.
module tb_coef_lut;
  import fir_psm_pkg::*;
  localparam int unsigned TAPS = 20;
  localparam int unsigned AW = $clog2(2*TAPS);

  logic             clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [AW-1:0]    addr = '0;
  logic [ROW_W-1:0] wdata = '0;
  logic [ROW_W-1:0] rows [2*TAPS];
  logic [ROW_W-1:0] model [2*TAPS];
  int checks = 0, failures = 0;

  coef_lut #(.TAPS(TAPS)) dut (.clk(clk), .rst_n(rst_n), .we(we), .addr(addr),
                               .wdata(wdata), .rows(rows));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < 2*TAPS; i++) begin
      checks++;
      if (rows[i] !== model[i]) begin
        failures++;
        $display("FAIL row %0d got=%h exp=%h", i, rows[i], model[i]);
      end
    end
  endtask

  function automatic logic [ROW_W-1:0] legal_row(int unsigned a);
    logic [ROW_W-1:0] r = ROW_W'($urandom);
    logic [4:0] masks [6] = '{5'b00000, 5'b10000, 5'b11000, 5'b11100, 5'b11110, 5'b11111};
    if (a % 2 == 0) r[4:0] = masks[$urandom_range(5)];
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 2*TAPS; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    compare_all();
    for (int n = 0; n < 1000; n++) begin
      int unsigned a;
      a = $urandom_range(2**AW - 1);
      @(negedge clk);
      we = 1'($urandom);
      addr = AW'(a);
      wdata = legal_row(a);
      @(posedge clk);
      if (we && a < 2*TAPS) model[a] = wdata;
      #1;
      compare_all();
    end
    @(negedge clk);
    we = 1'b0;
    rst_n = 1'b0;
    #1;
    for (int i = 0; i < 2*TAPS; i++) model[i] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
