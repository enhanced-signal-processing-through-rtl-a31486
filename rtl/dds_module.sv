// dds_module: numerically controlled oscillator (NCO) built on a pipelined
// CORDIC, producing the cosine and sine local-oscillator samples of the DDC.
//
// Structure (published design): a 24-bit phase accumulator adds the phase
// increment every clock and represents one turn [0, 2*pi). The phase word
// is then pre-processed: read as signed it lies in [-pi, pi); angles outside
// [-pi/2, pi/2) are moved by pi into that range and a quadrant flag records
// that the result must be negated. A 21-stage unrolled CORDIC (initial
// x = 1/K pre-scaled amplitude, initial y = 0) rotates the vector by the
// folded angle, and the output register restores the quadrant and rounds
// the result to 8 bits.
//
// This design's own choices: the 9-bit frequency word i_nco is shifted left
// by FCW_SHIFT before it is added, so the output frequency is
// i_nco * f_clk / 2^(PHASE_W - FCW_SHIFT) (f_clk/1024 per step by default);
// the CORDIC works on XY_W-bit words; the output amplitude is 127.
//
// Timing: one sample per clock. The output after clock edge m is the
// cosine/sine of the accumulator value present after edge m - LATENCY,
// LATENCY = CORDIC_ITER + 2. Asynchronous active-low reset clears the
// accumulator to phase 0.
module dds_module #(
  parameter int PHASE_W   = ddc_pkg::PHASE_W,
  parameter int FCW_W     = 9,
  parameter int FCW_SHIFT = 14,
  parameter int STAGES    = ddc_pkg::CORDIC_ITER,
  parameter int XY_W      = 24,
  parameter int OUT_W     = ddc_pkg::SAMPLE_W
) (
  input  logic                    i_fpga_clk,
  input  logic                    i_rst_n,
  input  logic [FCW_W-1:0]        i_nco,
  output logic signed [OUT_W-1:0] o_cos,
  output logic signed [OUT_W-1:0] o_sin
);
  localparam int FRAC = XY_W - OUT_W;
  localparam int AMP  = (1 << (OUT_W - 1)) - 1;
  // 1/K pre-scaling: AMP * 0.607252935 * 2^FRAC
  localparam logic signed [XY_W-1:0] X0 =
    XY_W'(longint'(real'(AMP) * 0.6072529350088813 * real'(longint'(1) << FRAC) + 0.5));
  localparam logic signed [XY_W:0] AMP_Q = (XY_W+1)'(AMP);
  localparam logic signed [PHASE_W-1:0] QUARTER = PHASE_W'(1) << (PHASE_W - 2);
  localparam logic signed [PHASE_W-1:0] HALF    = PHASE_W'(1) << (PHASE_W - 1);

  // Phase accumulation section
  logic [PHASE_W-1:0] phase_acc;
  always_ff @(posedge i_fpga_clk or negedge i_rst_n) begin
    if (!i_rst_n) phase_acc <= '0;
    else          phase_acc <= phase_acc + (PHASE_W'(i_nco) << FCW_SHIFT);
  end

  // Pre-processing: fold [-pi, pi) into [-pi/2, pi/2)
  logic signed [PHASE_W-1:0] z_s, z_fold;
  logic                      fold;
  always_comb begin
    z_s  = signed'(phase_acc);
    fold = (z_s >= QUARTER) || (z_s < -QUARTER);
    z_fold = fold ? z_s + HALF : z_s;   // +pi, wraps modulo one turn
  end

  logic signed [PHASE_W-1:0] z_pre;
  logic                      neg_pre;
  always_ff @(posedge i_fpga_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      z_pre   <= '0;
      neg_pre <= 1'b0;
    end else begin
      z_pre   <= z_fold;
      neg_pre <= fold;
    end
  end

  logic signed [XY_W-1:0] xc, yc;
  logic                   neg_c;
  cordic_rotate #(.STAGES(STAGES), .XY_W(XY_W), .Z_W(PHASE_W), .TAG_W(1)) u_cordic (
    .i_clk(i_fpga_clk), .i_rst_n(i_rst_n),
    .i_x(X0), .i_y('0), .i_z(z_pre), .i_tag(neg_pre),
    .o_x(xc), .o_y(yc), .o_tag(neg_c)
  );

  // Round to OUT_W bits, restore the quadrant, saturate to +-AMP
  function automatic logic signed [OUT_W-1:0] finish(input logic signed [XY_W-1:0] v,
                                                     input logic neg);
    logic signed [XY_W:0] r;
    logic signed [XY_W:0] q;
    r = (XY_W+1)'(v) + ((XY_W+1)'(1) <<< (FRAC - 1));
    q = r >>> FRAC;
    if (neg) q = -q;
    if (q > AMP_Q)       q = AMP_Q;
    else if (q < -AMP_Q) q = -AMP_Q;
    return q[OUT_W-1:0];
  endfunction

  always_ff @(posedge i_fpga_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_cos <= '0;
      o_sin <= '0;
    end else begin
      o_cos <= finish(xc, neg_c);
      o_sin <= finish(yc, neg_c);
    end
  end

endmodule
