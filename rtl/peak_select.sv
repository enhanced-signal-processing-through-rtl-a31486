// peak_select: picks the strongest FFT bin of the reference channel and
// hands the same bin of every channel to the phase-difference unit.
//
// The NCH FFTs run in lockstep, so their bins arrive together. For each
// frame this block tracks the bin with the largest power |X0[k]|^2 on
// channel 0 and keeps the complex value of that bin from every channel.
// When the last bin has passed, it outputs the bin index, the power (the
// signal's amplitude measurement) and the NCH complex values. Ties keep the
// lower bin. The receiver this design follows measures amplitude and phase
// from the FFT but does not describe how the bin is chosen: taking the
// peak of the reference channel is this design's choice.
//
// Timing: o_valid pulses one clock after the i_last bin. Asynchronous
// active-low reset.
module peak_select #(
  parameter int NCH = 5,
  parameter int W   = 16,
  parameter int N   = 64
) (
  input  logic                   i_clk,
  input  logic                   i_rst_n,
  input  logic                   i_valid,
  input  logic [$clog2(N)-1:0]   i_bin,
  input  logic                   i_last,
  input  logic signed [W-1:0]    i_re [NCH],
  input  logic signed [W-1:0]    i_im [NCH],
  output logic                   o_valid,
  output logic [$clog2(N)-1:0]   o_bin,
  output logic [2*W:0]           o_power,
  output logic signed [W-1:0]    o_re [NCH],
  output logic signed [W-1:0]    o_im [NCH]
);
  localparam int B = $clog2(N);

  logic [2*W:0]         p, best;
  logic [B-1:0]         best_bin;
  logic signed [W-1:0]  hold_re [NCH], hold_im [NCH];
  logic                 take;

  always_comb begin
    p    = (2*W+1)'(i_re[0] * i_re[0]) + (2*W+1)'(i_im[0] * i_im[0]);
    take = (i_bin == '0) || (p > best);
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      best     <= '0;
      best_bin <= '0;
      o_valid  <= 1'b0;
      o_bin    <= '0;
      o_power  <= '0;
      for (int c = 0; c < NCH; c++) begin
        hold_re[c] <= '0; hold_im[c] <= '0;
        o_re[c]    <= '0; o_im[c]    <= '0;
      end
    end else begin
      o_valid <= i_valid && i_last;
      if (i_valid && take) begin
        best     <= p;
        best_bin <= i_bin;
        for (int c = 0; c < NCH; c++) begin
          hold_re[c] <= i_re[c];
          hold_im[c] <= i_im[c];
        end
      end
      if (i_valid && i_last) begin
        o_bin   <= take ? i_bin : best_bin;
        o_power <= take ? p : best;
        for (int c = 0; c < NCH; c++) begin
          o_re[c] <= take ? i_re[c] : hold_re[c];
          o_im[c] <= take ? i_im[c] : hold_im[c];
        end
      end
    end
  end

endmodule
