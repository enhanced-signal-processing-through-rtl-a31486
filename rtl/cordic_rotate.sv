// cordic_rotate: fully unrolled, pipelined CORDIC in rotation mode.
//
// Each of the STAGES stages performs one CORDIC micro-rotation
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)
// with d = +1 when the residual angle z is non-negative and -1 otherwise,
// exactly as in the published unrolled structure: two shifters, two
// adder/subtractors whose operation is chosen by the sign of the angle
// accumulator, and a third adder/subtractor that removes the constant
// angle of the stage. Every stage ends in a register, so one new vector is
// accepted per clock and appears at the output STAGES clocks later, scaled
// by the CORDIC gain (about 1.6468 for many stages).
//
// The angle i_z is a signed fraction of a turn: 2^Z_W equals 2*pi, so the
// convergence range of +-99.7 degrees covers the [-pi/2, pi/2] input range
// the NCO supplies. A TAG_W-bit side word travels alongside the data with
// the same latency (the NCO uses it for its quadrant flag). Reset is
// asynchronous and active low; the word widths are this design's choice.
module cordic_rotate #(
  parameter int STAGES = 21,
  parameter int XY_W   = 24,
  parameter int Z_W    = 24,
  parameter int TAG_W  = 1
) (
  input  logic                   i_clk,
  input  logic                   i_rst_n,
  input  logic signed [XY_W-1:0] i_x,
  input  logic signed [XY_W-1:0] i_y,
  input  logic signed [Z_W-1:0]  i_z,
  input  logic [TAG_W-1:0]       i_tag,
  output logic signed [XY_W-1:0] o_x,
  output logic signed [XY_W-1:0] o_y,
  output logic [TAG_W-1:0]       o_tag
);
  import ddc_pkg::*;

  logic signed [XY_W-1:0] x [0:STAGES];
  logic signed [XY_W-1:0] y [0:STAGES];
  logic signed [Z_W-1:0]  z [0:STAGES];
  logic [TAG_W-1:0]       t [0:STAGES];

  assign x[0] = i_x;
  assign y[0] = i_y;
  assign z[0] = i_z;
  assign t[0] = i_tag;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam logic signed [Z_W-1:0] ANGLE = Z_W'(atan_w(s, Z_W));
    always_ff @(posedge i_clk or negedge i_rst_n) begin
      if (!i_rst_n) begin
        x[s+1] <= '0;
        y[s+1] <= '0;
        z[s+1] <= '0;
        t[s+1] <= '0;
      end else if (!z[s][Z_W-1]) begin   // d = +1
        x[s+1] <= x[s] - (y[s] >>> s);
        y[s+1] <= y[s] + (x[s] >>> s);
        z[s+1] <= z[s] - ANGLE;
        t[s+1] <= t[s];
      end else begin                       // d = -1
        x[s+1] <= x[s] + (y[s] >>> s);
        y[s+1] <= y[s] - (x[s] >>> s);
        z[s+1] <= z[s] + ANGLE;
        t[s+1] <= t[s];
      end
    end
  end

  assign o_x   = x[STAGES];
  assign o_y   = y[STAGES];
  assign o_tag = t[STAGES];

endmodule
