// Coefficient look-up table of the PSM filter.
//
// Holds two 18-bit rows per coefficient: row 2k (sign, operands 1-2 and the
// presence flags MMMML) and row 2k+1 (operands 3-5) of tap k. Loading a new
// set of rows reconfigures the filter for another specification or another
// coefficient word length; the hardware around it does not change. All rows
// are read in parallel, every cycle, by the processing elements, so the table
// is a register array. The two-row format is that of the PSM; the write port
// (one row per clock on we/addr/wdata, visible from the next cycle) and the
// reset to all zeros (every coefficient zero) are this design's choice.
module coef_lut
  import fir_psm_pkg::*;
#(
  parameter int unsigned TAPS = 20
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [$clog2(2*TAPS)-1:0]     addr,
  input  logic [ROW_W-1:0]              wdata,
  output logic [ROW_W-1:0]              rows [2*TAPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*TAPS; i++) rows[i] <= '0;
    end else if (we && (32'(addr) < 2*TAPS)) begin
      rows[addr] <= wdata;
    end
  end

  // A first row must mark its operands as a prefix 1..n.
  a_mask_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    (we && addr[0] == 1'b0) |-> mask_is_prefix(wdata[4:1], wdata[0]))
    else $error("coef_lut: row %0d has a presence code that is not a prefix", addr);

endmodule
