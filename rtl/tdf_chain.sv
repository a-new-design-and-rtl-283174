// Structural adders and delays of the transposed direct-form FIR filter.
//
// Every tap k has a product p[k] = h_k * x[n] of the current sample. The
// chain holds partial sums z_k, updated on each sample (en high):
//   z_(TAPS-1) <= p[TAPS-1],   z_k <= p[k] + z_(k+1),
// so y = z_0 = sum_k h_k * x[n-k] is registered and appears one clock after
// its sample. The transposed form is that of the design; the accumulator
// width ACC_W (P_W plus $clog2(TAPS) guard bits, so no sum overflows) and the
// clock-enable interface are this design's choice. Reset clears the delays.
module tdf_chain #(
  parameter int unsigned TAPS  = 20,
  parameter int unsigned P_W   = 37,
  parameter int unsigned ACC_W = P_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [P_W-1:0]   p [TAPS],
  output logic signed [ACC_W-1:0] y
);

  logic signed [ACC_W-1:0] z [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) z[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < TAPS - 1; k++) z[k] <= ACC_W'(p[k]) + z[k+1];
      z[TAPS-1] <= ACC_W'(p[TAPS-1]);
    end
  end

  assign y = z[0];

endmodule
