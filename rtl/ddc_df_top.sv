// ddc_df_top: five-channel digital downconversion front end of a
// phase-interferometer direction finder.
//
// One RF signal, split five ways and sampled by five synchronised ADCs,
// enters as five complex IF streams. Each stream has its own DDC channel
// (NCO, mixer, CIC / half-band / FIR decimation). All five share the clock,
// the reset and the NCO frequency word, so their NCOs stay phase-locked and
// the relative phases of the channels survive the downconversion. As in the
// receiver this design follows, each channel's decimated output then goes
// through an FFT. The phases of the five channels are read at the
// strongest bin, and their differences to channel 0 are reported. The power
// of that bin is the amplitude measurement. Finally the differences are
// corrected with those stored from a calibration frame (i_cal = 1) and
// correlated against the pattern of a five-element circular array over NAZ
// candidate azimuths; the best match is the bearing, o_azimuth.
//
// FFT_N = 64, the peak-bin choice, the CORDIC phase measurement, the array
// geometry and the azimuth grid are this design's choices. The RF-module
// control and the host interface of the published receiver are not
// included. The decimated I/Q samples are also brought out.
//
// Timing: one input sample per channel per clock. o_ddc_fp pulses with each
// decimated sample (every 2*CIC_R = 64 clocks). After every FFT_N decimated
// samples (4096 clocks by default) one result follows: o_phase_valid
// pulses 194 (FFT) + 1 (peak) + 16 (phase) clocks after the frame's last
// decimated sample. For a frame with i_cal = 1 (held high around
// o_phase_valid), o_cal_valid follows one clock later; for any other frame
// o_df_busy is high for NAZ clocks, then o_az_valid pulses with o_azimuth
// (units of 360/NAZ degrees) and o_az_score. Asynchronous active-low reset.
module ddc_df_top #(
  parameter int NCH   = 5,
  parameter int CIC_R = 32,
  parameter int FFT_N = 64,
  parameter int NAZ   = 72
) (
  input  logic                       i_fpga_clk,
  input  logic                       i_rst_n,
  input  logic [8:0]                 i_nco,
  input  logic                       i_cal,
  input  ddc_pkg::sample_t           i_signal_i   [NCH],
  input  ddc_pkg::sample_t           i_signal_q   [NCH],
  output ddc_pkg::sample_t           o_ddc_i      [NCH],
  output ddc_pkg::sample_t           o_ddc_q      [NCH],
  output logic                       o_ddc_fp,
  output logic                       o_phase_valid,
  output logic [$clog2(FFT_N)-1:0]   o_peak_bin,
  output logic [32:0]                o_peak_power,
  output logic signed [15:0]         o_phase      [NCH],
  output logic signed [15:0]         o_phase_diff [NCH],
  output logic                       o_cal_valid,
  output logic                       o_df_busy,
  output logic                       o_az_valid,
  output logic [$clog2(NAZ)-1:0]     o_azimuth,
  output logic signed [15:0]         o_az_score
);
  import ddc_pkg::*;

  localparam int FW = 16;
  localparam int B  = $clog2(FFT_N);

  logic                 fp [NCH];
  logic                 fv [NCH], fl [NCH];
  logic [B-1:0]         fb [NCH];
  logic signed [FW-1:0] fre [NCH], fim [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    ddc_module #(.CIC_R(CIC_R)) u_ddc (
      .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n), .i_nco(i_nco),
      .i_signal_i(i_signal_i[c]), .i_signal_q(i_signal_q[c]),
      .o_ddc_i(o_ddc_i[c]), .o_ddc_q(o_ddc_q[c]), .o_ddc_fp(fp[c])
    );

    fft_core #(.N(FFT_N), .IN_W(SAMPLE_W), .W(FW)) u_fft (
      .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
      .i_valid(fp[c]), .i_re(o_ddc_i[c]), .i_im(o_ddc_q[c]),
      .o_valid(fv[c]), .o_bin(fb[c]), .o_last(fl[c]), .o_re(fre[c]), .o_im(fim[c])
    );
  end

  assign o_ddc_fp = fp[0];

  logic                 pk_v;
  logic signed [FW-1:0] pk_re [NCH], pk_im [NCH];

  peak_select #(.NCH(NCH), .W(FW), .N(FFT_N)) u_peak (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_valid(fv[0]), .i_bin(fb[0]), .i_last(fl[0]), .i_re(fre), .i_im(fim),
    .o_valid(pk_v), .o_bin(o_peak_bin), .o_power(o_peak_power), .o_re(pk_re), .o_im(pk_im)
  );

  phase_diff #(.NCH(NCH), .IN_W(FW), .FRAC(4), .Z_W(16), .STAGES(14)) u_phase_diff (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_valid(pk_v), .i_i(pk_re), .i_q(pk_im),
    .o_valid(o_phase_valid), .o_phase(o_phase), .o_diff(o_phase_diff)
  );

  correlation_azimuth #(.NCH(NCH), .Z_W(16), .NAZ(NAZ), .R_MILLI(500), .CB(8)) u_corr (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_valid(o_phase_valid), .i_cal(i_cal), .i_diff(o_phase_diff),
    .o_cal_valid(o_cal_valid), .o_busy(o_df_busy), .o_valid(o_az_valid),
    .o_azimuth(o_azimuth), .o_score(o_az_score)
  );

  // The channels run in lockstep: their decimation strobes and FFT bin
  // streams always coincide.
  for (genvar c = 1; c < NCH; c++) begin : g_sync
    a_lockstep: assert property (@(posedge i_fpga_clk) disable iff (!i_rst_n)
                                 fp[c] == fp[0] && fv[c] == fv[0] && fb[c] == fb[0] && fl[c] == fl[0]);
  end

endmodule
