// Reconfigurable FIR filter, programmable shifts method (PSM), parallel form.
//
// A transposed direct-form filter whose multiplier block has no multipliers:
// the input goes through one shared shift and add unit that forms its binary
// common subexpressions (x, x + x/2, x + x/4, x + x/2 + x/4). One PSM
// processing element per tap selects, shifts and adds up to five of them, as
// coded in the coefficient LUT, to form h_k * x. The products enter the
// transposed delay/adder chain. A new coefficient set, or a shorter
// coefficient word length, is only a new LUT content.
//
// Interface: coefficients are written one 18-bit row per clock on
// cfg_we/cfg_addr/cfg_wdata (rows 2k and 2k+1 belong to tap k). A sample is
// taken on each clock with x_valid high; y_out = sum_k h_k * x[n-k] is
// registered and valid (y_valid) one clock later. y_out is full precision,
// with 17 fraction bits: y_out = 4 * sum_k x[n-k] * H_k, H_k the signed
// coefficient scaled by 2^15. Filter structure, PE and LUT format follow the
// PSM; the 16-bit input, the parallel form, full-precision output and the
// one-clock latency are this design's choices.
module fir_psm_top
  import fir_psm_pkg::*;
#(
  parameter int unsigned TAPS = 20,
  parameter int unsigned X_W  = 16,
  localparam int unsigned P_W   = X_W + BCS_GROW + MAX_SHR + OPS_GROW,
  localparam int unsigned ACC_W = P_W + $clog2(TAPS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_we,
  input  logic [$clog2(2*TAPS)-1:0]    cfg_addr,
  input  logic [ROW_W-1:0]             cfg_wdata,
  input  logic                         x_valid,
  input  logic signed [X_W-1:0]        x_in,
  output logic                         y_valid,
  output logic signed [ACC_W-1:0]      y_out
);

  logic signed [X_W+BCS_GROW-1:0] bcs [4];
  logic [ROW_W-1:0]               rows [2*TAPS];
  logic signed [P_W-1:0]          p [TAPS];

  bcs_shift_add #(.X_W(X_W)) u_sau (
    .x   (x_in),
    .bcs (bcs)
  );

  coef_lut #(.TAPS(TAPS)) u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_we),
    .addr  (cfg_addr),
    .wdata (cfg_wdata),
    .rows  (rows)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_pe
    psm_pe #(.X_W(X_W)) u_pe (
      .bcs  (bcs),
      .row1 (lut_row1_t'(rows[2*k])),
      .row2 (lut_row2_t'(rows[2*k+1])),
      .p    (p[k])
    );
  end

  tdf_chain #(.TAPS(TAPS), .P_W(P_W), .ACC_W(ACC_W)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (x_valid),
    .p     (p),
    .y     (y_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= x_valid;
  end

endmodule
