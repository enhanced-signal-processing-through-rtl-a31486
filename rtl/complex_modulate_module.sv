// complex_modulate_module: the digital (IQ) mixer of the DDC.
//
// The complex input sample (i_idata + j*i_qdata) is multiplied by the
// complex conjugate of the NCO signal (i_dds_cos - j*i_dds_sin); this block
// returns the real part,
//   o_ddc_modulate = i_idata * i_dds_cos + i_qdata * i_dds_sin,
// so an input tone at f_in and an NCO at f_nco give a tone at f_in - f_nco.
// The port names and widths (four 8-bit inputs, one 16-bit output) are
// those of the published mixer; the quadrature branch of a DDC uses a
// second instance with the inputs swapped and the sine negated.
//
// Timing (this design's choice): two register stages, the two products
// first and their sum second, so the output lags the inputs by 2 clocks.
// With NCO samples limited to +-127 the sum always fits in 16 bits.
// Asynchronous active-low reset.
module complex_modulate_module (
  input  logic              i_fpga_clk,
  input  logic              i_rst_n,
  input  ddc_pkg::sample_t  i_idata,
  input  ddc_pkg::sample_t  i_qdata,
  input  ddc_pkg::sample_t  i_dds_cos,
  input  ddc_pkg::sample_t  i_dds_sin,
  output ddc_pkg::mix_t     o_ddc_modulate
);
  import ddc_pkg::*;

  mix_t p_ic, p_qs;

  always_ff @(posedge i_fpga_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      p_ic           <= '0;
      p_qs           <= '0;
      o_ddc_modulate <= '0;
    end else begin
      p_ic           <= MIX_W'(i_idata) * MIX_W'(i_dds_cos);
      p_qs           <= MIX_W'(i_qdata) * MIX_W'(i_dds_sin);
      o_ddc_modulate <= p_ic + p_qs;
    end
  end

endmodule
