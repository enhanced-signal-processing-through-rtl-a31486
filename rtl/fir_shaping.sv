// fir_shaping: pipelined symmetric FIR filter that shapes the decimated
// signal (no rate change), the last stage of the DDC filter chain.
//
// Structure (published pipelined form): the input runs down a tapped delay
// line; because the impulse response is symmetric, the two samples that
// share a coefficient H(k) are added first (pre-adders), each pair sum is
// multiplied by its coefficient, and the products are accumulated. Registers
// between the pre-add, multiply and accumulate sections break the
// arithmetic into short steps so the filter runs at the full clock rate.
// The 15 coefficients are this design's own low-pass (Hamming-windowed
// sinc, cut-off 0.2 cycles/sample, sum 1024 so the DC gain is 1); the
// published design does not print its coefficients.
//
// Timing: one sample per i_valid. o_valid follows 4 clocks after each valid
// input (delay line, pre-add, multiply, accumulate-and-round), so inputs may
// arrive every clock. Output = round(sum_k h[k]*x[n-k] / 1024), saturated to
// W bits. Asynchronous active-low reset.
module fir_shaping #(
  parameter int W = ddc_pkg::FILT_W
) (
  input  logic                i_clk,
  input  logic                i_rst_n,
  input  logic                i_valid,
  input  logic signed [W-1:0] i_data,
  output logic                o_valid,
  output logic signed [W-1:0] o_data
);
  import ddc_pkg::*;

  localparam int TAPS  = FIR_TAPS;
  localparam int HALF  = (TAPS + 1) / 2;   // distinct coefficients
  localparam int ACC_W = W + 14;
  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [W-1:0] sr [TAPS];
  acc_t                pre  [HALF];
  acc_t                prod [HALF];
  logic [2:0]          vpipe;

  // Section 1: delay line
  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int k = 0; k < TAPS; k++) sr[k] <= '0;
    end else if (i_valid) begin
      sr[0] <= i_data;
      for (int k = 1; k < TAPS; k++) sr[k] <= sr[k-1];
    end
  end

  // Sections 2 and 3: pre-adders, then coefficient multipliers
  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int k = 0; k < HALF; k++) begin
        pre[k]  <= '0;
        prod[k] <= '0;
      end
    end else begin
      for (int k = 0; k < HALF; k++) begin
        if (k == TAPS - 1 - k) pre[k] <= acc_t'(sr[k]);
        else                   pre[k] <= acc_t'(sr[k]) + acc_t'(sr[TAPS-1-k]);
        prod[k] <= pre[k] * acc_t'(fir_coef(k));
      end
    end
  end

  // Section 4: accumulate, round, saturate
  acc_t sum, rounded;
  always_comb begin
    sum = '0;
    for (int k = 0; k < HALF; k++) sum += prod[k];
    rounded = (sum + (acc_t'(1) <<< (FIR_SHIFT - 1))) >>> FIR_SHIFT;
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      vpipe   <= '0;
      o_valid <= 1'b0;
      o_data  <= '0;
    end else begin
      vpipe   <= {vpipe[1:0], i_valid};
      o_valid <= vpipe[2];
      if (vpipe[2]) begin
        if (rounded > acc_t'(2**(W-1) - 1))   o_data <= {1'b0, {(W-1){1'b1}}};
        else if (rounded < -acc_t'(2**(W-1))) o_data <= {1'b1, {(W-1){1'b0}}};
        else                                  o_data <= rounded[W-1:0];
      end
    end
  end

endmodule
