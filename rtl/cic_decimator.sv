// cic_decimator: N-stage cascaded integrator-comb decimation filter,
// H(z) = ((1 - z^-(R*M)) / (1 - z^-1))^N, decimating by R.
//
// Following the efficient decimating structure of the published design,
// N integrators run at the input rate, the decimator keeps every R-th
// integrator output, and N comb sections with differential delay M run at
// the low rate. Word width grows to IN_W + N*log2(R*M) bits so the
// wrap-around two's-complement arithmetic gives the exact result; the DC
// gain is (R*M)^N. N = 3 follows the published three-stage example, and
// R = 32 is the top of the factor range quoted for it (1 to 32); M = 1 is
// this design's choice (M is typically 1 or 2). R must be at least 2.
//
// Timing: one input per clock when i_valid is high. Each integrator is a
// register, so the integrator chain lags by N-1 samples; the comb sections
// are evaluated on the decimation clock and registered once: o_valid pulses
// one clock after every R-th valid input, and output k equals the N-fold
// boxcar sum of the input ending at input index (k+1)*R - 1 - N.
// Asynchronous active-low reset clears all state.
module cic_decimator #(
  parameter int IN_W  = ddc_pkg::SAMPLE_W,
  parameter int N     = 3,
  parameter int R     = 32,
  parameter int M     = 1,
  parameter int OUT_W = IN_W + N * $clog2(R * M)
) (
  input  logic                    i_clk,
  input  logic                    i_rst_n,
  input  logic                    i_valid,
  input  logic signed [IN_W-1:0]  i_data,
  output logic                    o_valid,
  output logic signed [OUT_W-1:0] o_data
);
  typedef logic signed [OUT_W-1:0] acc_t;

  acc_t integ [N];
  acc_t delay [N][M];
  logic [$clog2(R)-1:0] cnt;

  // Integrators at the high rate
  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int k = 0; k < N; k++) integ[k] <= '0;
    end else if (i_valid) begin
      integ[0] <= integ[0] + acc_t'(i_data);
      for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
    end
  end

  // Decimator: every R-th input
  logic dec_strobe;
  always_comb dec_strobe = i_valid && (cnt == ($clog2(R))'(R - 1));

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n)        cnt <= '0;
    else if (dec_strobe) cnt <= '0;
    else if (i_valid)    cnt <= cnt + 1'b1;
  end

  // Combs at the low rate
  acc_t comb [N+1];
  always_comb begin
    comb[0] = integ[N-1];
    for (int k = 0; k < N; k++) comb[k+1] = comb[k] - delay[k][M-1];
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int k = 0; k < N; k++)
        for (int d = 0; d < M; d++) delay[k][d] <= '0;
      o_data  <= '0;
      o_valid <= 1'b0;
    end else begin
      o_valid <= dec_strobe;
      if (dec_strobe) begin
        for (int k = 0; k < N; k++) begin
          delay[k][0] <= comb[k];
          for (int d = 1; d < M; d++) delay[k][d] <= delay[k][d-1];
        end
        o_data <= comb[N];
      end
    end
  end

endmodule
