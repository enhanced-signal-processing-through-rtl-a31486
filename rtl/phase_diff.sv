// phase_diff: phase-difference calculation for a multi-channel
// direction-finding receiver.
//
// For each of NCH synchronised channels the phase of the complex value
// (I, Q), IN_W bits each, is measured with a pipelined vectoring CORDIC
// (cordic_vector, FRAC extra fractional bits), and the difference of every channel's phase to channel 0 is formed modulo one
// turn. In the five-channel top the values are the peak FFT bin of each
// channel, as in the receiver this design follows. The CORDIC method, the
// 16-bit phase format (2^16 = 360 degrees, signed, so differences wrap to
// [-180, 180) degrees) and the 14 iterations are this design's choices.
//
// Timing: one set of NCH values per i_valid; o_valid and the results
// follow STAGES+2 clocks later. o_phase[k] is channel k's phase,
// o_diff[k] = o_phase[k] - o_phase[0] (o_diff[0] is always 0).
// Asynchronous active-low reset.
module phase_diff #(
  parameter int NCH    = 5,
  parameter int IN_W   = 16,
  parameter int FRAC   = 4,
  parameter int Z_W    = 16,
  parameter int STAGES = 14
) (
  input  logic                    i_clk,
  input  logic                    i_rst_n,
  input  logic                    i_valid,
  input  logic signed [IN_W-1:0]  i_i    [NCH],
  input  logic signed [IN_W-1:0]  i_q    [NCH],
  output logic                    o_valid,
  output logic signed [Z_W-1:0]   o_phase [NCH],
  output logic signed [Z_W-1:0]   o_diff  [NCH]
);
  logic                  cv [NCH];
  logic signed [Z_W-1:0] ang [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    cordic_vector #(.IN_W(IN_W), .Z_W(Z_W), .STAGES(STAGES), .FRAC(FRAC)) u_vec (
      .i_clk(i_clk), .i_rst_n(i_rst_n), .i_valid(i_valid),
      .i_i(i_i[c]), .i_q(i_q[c]),
      .o_valid(cv[c]), .o_angle(ang[c])
    );
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        o_phase[c] <= '0;
        o_diff[c]  <= '0;
      end
    end else begin
      o_valid <= cv[0];
      if (cv[0]) begin
        for (int c = 0; c < NCH; c++) begin
          o_phase[c] <= ang[c];
          o_diff[c]  <= ang[c] - ang[0];   // modulo 2^Z_W = one turn
        end
      end
    end
  end

endmodule
