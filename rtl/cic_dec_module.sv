// cic_dec_module: the decimation and shaping filter module of one DDC path.
//
// The mixed, 8-bit signal i_cic_data (one sample per clock) passes through
//   1. a 3-stage CIC decimator (rate / CIC_R, DC gain CIC_R^3),
//   2. a half-band filter decimating by 2,
//   3. a symmetric FIR shaping filter without rate change,
// as in the published filter bank, where the CIC and half-band filters do
// the decimation with cheap arithmetic and the FIR only shapes the band.
// Between the stages this design keeps 16-bit words (FILT_W): the CIC output
// is divided by its gain down to 8 fractional bits (input * 256), and the
// final result is rounded back to 8 bits and saturated.
//
// Interface: port names follow the published schematic. o_cic_fp is the
// completion flag of the module: a one-clock pulse with each new o_cic_data.
// Rate: one output every 2*CIC_R clocks (64 by default). Latency from the
// last input sample that affects an output to the o_cic_fp pulse is about
// 1 (CIC) + 2 (half-band) + 4 (FIR) + 1 clocks plus the filters' group
// delays. Asynchronous active-low reset.
module cic_dec_module #(
  parameter int CIC_N = 3,
  parameter int CIC_R = 32,
  parameter int CIC_M = 1
) (
  input  logic             i_fpga_clk,
  input  logic             i_rst_n,
  input  ddc_pkg::sample_t i_cic_data,
  output ddc_pkg::sample_t o_cic_data,
  output logic             o_cic_fp
);
  import ddc_pkg::*;

  localparam int GROWTH = CIC_N * $clog2(CIC_R * CIC_M);
  localparam int CIC_W  = SAMPLE_W + GROWTH;
  // Keep (input * 2^(FILT_W-SAMPLE_W)) after removing the CIC gain.
  localparam int DROP   = GROWTH - (FILT_W - SAMPLE_W);
  localparam int OUT_SH = FILT_W - SAMPLE_W;

  logic                    cic_v, hb_v, fir_v;
  logic signed [CIC_W-1:0] cic_y;
  filt_t                   cic_s, hb_y, fir_y;

  cic_decimator #(.IN_W(SAMPLE_W), .N(CIC_N), .R(CIC_R), .M(CIC_M)) u_cic (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_valid(1'b1), .i_data(i_cic_data),
    .o_valid(cic_v), .o_data(cic_y)
  );

  if (DROP >= 0) begin : g_drop
    assign cic_s = filt_t'(cic_y >>> DROP);
  end else begin : g_gain
    assign cic_s = filt_t'(cic_y) <<< (-DROP);
  end

  hb_decimator #(.W(FILT_W)) u_hb (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_valid(cic_v), .i_data(cic_s),
    .o_valid(hb_v), .o_data(hb_y)
  );

  fir_shaping #(.W(FILT_W)) u_fir (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_valid(hb_v), .i_data(hb_y),
    .o_valid(fir_v), .o_data(fir_y)
  );

  // Back to 8 bits: round, shift, saturate
  logic signed [FILT_W:0] r;
  always_comb r = ((FILT_W+1)'(fir_y) + (FILT_W+1)'(1 << (OUT_SH - 1))) >>> OUT_SH;

  always_ff @(posedge i_fpga_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_cic_data <= '0;
      o_cic_fp   <= 1'b0;
    end else begin
      o_cic_fp <= fir_v;
      if (fir_v) begin
        if (r > (FILT_W+1)'(127))       o_cic_data <= 8'sd127;
        else if (r < -(FILT_W+1)'(128)) o_cic_data <= -8'sd128;
        else                            o_cic_data <= r[SAMPLE_W-1:0];
      end
    end
  end

endmodule
