// ddc_round: scales the 16-bit mixer output back to an 8-bit sample before
// the decimation filters.
//
// The published schematic places an adder (a 7-bit constant added to the
// low 15 bits of the product), a right shift and an asynchronously cleared
// 8-bit register between the mixer and the filter module. This block does
// the same job: it adds the rounding constant 2^(SHIFT-1) = 64, shifts
// right arithmetically by SHIFT = 7 and registers the result. Unlike a
// plain bit slice it saturates to the 8-bit range (this design's choice), so
// a product outside +-2^14 cannot wrap. A full-scale NCO (127) times an
// input of amplitude A gives an output of amplitude about A.
//
// Timing: 1 clock. Asynchronous active-low reset.
module ddc_round #(
  parameter int IN_W  = ddc_pkg::MIX_W,
  parameter int OUT_W = ddc_pkg::SAMPLE_W,
  parameter int SHIFT = 7
) (
  input  logic                    i_fpga_clk,
  input  logic                    i_rst_n,
  input  logic signed [IN_W-1:0]  i_data,
  output logic signed [OUT_W-1:0] o_data
);
  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(1 << (OUT_W - 1));

  logic signed [IN_W:0] r;
  always_comb r = ((IN_W+1)'(i_data) + (IN_W+1)'(1 << (SHIFT - 1))) >>> SHIFT;

  always_ff @(posedge i_fpga_clk or negedge i_rst_n) begin
    if (!i_rst_n)       o_data <= '0;
    else if (r > MAXV)  o_data <= MAXV[OUT_W-1:0];
    else if (r < MINV)  o_data <= MINV[OUT_W-1:0];
    else                o_data <= r[OUT_W-1:0];
  end

endmodule
