// cordic_vector: pipelined CORDIC in vectoring mode, returning the angle
// atan2(i_q, i_i) of a complex sample as a fraction of a turn.
//
// A first stage moves vectors in the left half-plane by pi (negating both
// components, angle pi), because CORDIC vectoring only converges for
// |angle| < 99.7 degrees. Each following stage drives y towards zero:
//   y >= 0: x' = x + (y >>> i), y' = y - (x >>> i), z' = z + atan(2^-i)
//   y <  0: x' = x - (y >>> i), y' = y + (x >>> i), z' = z - atan(2^-i)
// so z accumulates the angle of the input. The inputs are extended by
// FRAC fractional bits and two guard bits for the CORDIC gain.
//
// Timing: one sample per clock, result STAGES+1 clocks later with o_valid
// following i_valid. The angle is signed, 2^Z_W = one turn, so it wraps
// naturally at +-pi. Asynchronous active-low reset.
module cordic_vector #(
  parameter int IN_W   = ddc_pkg::SAMPLE_W,
  parameter int Z_W    = 16,
  parameter int STAGES = 14,
  parameter int FRAC   = 8
) (
  input  logic                   i_clk,
  input  logic                   i_rst_n,
  input  logic                   i_valid,
  input  logic signed [IN_W-1:0] i_i,
  input  logic signed [IN_W-1:0] i_q,
  output logic                   o_valid,
  output logic signed [Z_W-1:0]  o_angle
);
  import ddc_pkg::*;

  localparam int XY_W = IN_W + FRAC + 2;
  localparam logic signed [Z_W-1:0] PI = Z_W'(1) << (Z_W - 1);

  logic signed [XY_W-1:0] x [0:STAGES];
  logic signed [XY_W-1:0] y [0:STAGES];
  logic signed [Z_W-1:0]  z [0:STAGES];
  logic                   v [0:STAGES];

  // Stage 0: half-plane correction
  logic signed [XY_W-1:0] xi, yi;
  always_comb begin
    xi = XY_W'(i_i) <<< FRAC;
    yi = XY_W'(i_q) <<< FRAC;
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= i_valid;
      if (i_i < 0) begin
        x[0] <= -xi; y[0] <= -yi; z[0] <= PI;
      end else begin
        x[0] <= xi;  y[0] <= yi;  z[0] <= '0;
      end
    end
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam logic signed [Z_W-1:0] ANGLE = Z_W'(atan_w(s, Z_W));
    always_ff @(posedge i_clk or negedge i_rst_n) begin
      if (!i_rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        if (!y[s][XY_W-1]) begin
          x[s+1] <= x[s] + (y[s] >>> s);
          y[s+1] <= y[s] - (x[s] >>> s);
          z[s+1] <= z[s] + ANGLE;
        end else begin
          x[s+1] <= x[s] - (y[s] >>> s);
          y[s+1] <= y[s] + (x[s] >>> s);
          z[s+1] <= z[s] - ANGLE;
        end
      end
    end
  end

  assign o_valid = v[STAGES];
  assign o_angle = z[STAGES];

endmodule
