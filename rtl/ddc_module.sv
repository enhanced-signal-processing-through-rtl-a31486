// ddc_module: one complete digital downconversion channel.
//
// The complex IF input (i_signal_i + j*i_signal_q) is multiplied by the
// conjugate of the NCO's local oscillator, which moves a tone at
// f_in to f_in - f_nco, and both baseband paths are then decimated and
// shaped by the CIC / half-band / FIR filter module:
//   I path: i*cos + q*sin  (the mixer of the published schematic)
//   Q path: q*cos - i*sin  (second mixer instance, inputs swapped, -sin)
// Each mixer output is rounded to 8 bits in a register (ddc_round) before
// the filters. The published schematic draws the I path; the Q path
// completes the two-path block diagram of the same design.
//
// Interface: i_nco is the 9-bit NCO frequency word (f_nco = i_nco *
// f_clk / 1024 by default); one input sample per clock; o_ddc_i/o_ddc_q
// are valid when o_ddc_fp pulses, once every 2*CIC_R clocks.
// Latency to the filter input: NCO (23 clocks, the NCO runs free from
// reset), mixer 2, rounding 1. Asynchronous active-low reset.
module ddc_module #(
  parameter int CIC_R = 32
) (
  input  logic             i_fpga_clk,
  input  logic             i_rst_n,
  input  logic [8:0]       i_nco,
  input  ddc_pkg::sample_t i_signal_i,
  input  ddc_pkg::sample_t i_signal_q,
  output ddc_pkg::sample_t o_ddc_i,
  output ddc_pkg::sample_t o_ddc_q,
  output logic             o_ddc_fp
);
  import ddc_pkg::*;

  sample_t nco_cos, nco_sin, nco_nsin;
  mix_t    mod_i, mod_q;
  sample_t r_ddc_i, r_ddc_q;
  logic    fp_q;

  dds_module u0_dds_module (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n), .i_nco(i_nco),
    .o_cos(nco_cos), .o_sin(nco_sin)
  );

  // NCO samples are limited to +-127, so the negation cannot overflow.
  assign nco_nsin = -nco_sin;

  complex_modulate_module u1_complex_modulate_module (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_idata(i_signal_i), .i_qdata(i_signal_q),
    .i_dds_cos(nco_cos), .i_dds_sin(nco_sin),
    .o_ddc_modulate(mod_i)
  );

  complex_modulate_module u2_complex_modulate_module (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_idata(i_signal_q), .i_qdata(i_signal_i),
    .i_dds_cos(nco_cos), .i_dds_sin(nco_nsin),
    .o_ddc_modulate(mod_q)
  );

  ddc_round u_round_i (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n), .i_data(mod_i), .o_data(r_ddc_i)
  );
  ddc_round u_round_q (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n), .i_data(mod_q), .o_data(r_ddc_q)
  );

  cic_dec_module #(.CIC_R(CIC_R)) u0_cic_dec_module (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_cic_data(r_ddc_i), .o_cic_data(o_ddc_i), .o_cic_fp(o_ddc_fp)
  );

  cic_dec_module #(.CIC_R(CIC_R)) u1_cic_dec_module (
    .i_fpga_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_cic_data(r_ddc_q), .o_cic_data(o_ddc_q), .o_cic_fp(fp_q)
  );

  // Both paths share one timing; their completion flags always agree.
  property p_paths_aligned;
    @(posedge i_fpga_clk) disable iff (!i_rst_n) o_ddc_fp == fp_q;
  endproperty
  a_paths_aligned: assert property (p_paths_aligned);

endmodule
