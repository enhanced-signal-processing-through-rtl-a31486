// hb_decimator: half-band low-pass filter with decimation by 2.
//
// A half-band filter has a response symmetric about a quarter of the
// sample rate, H(w) = 1 - H(pi - w), so every second coefficient except the
// centre one is zero and the centre one is 1/2; the published design uses
// it after the CIC filter to halve the rate with about half the arithmetic
// of a general FIR. This design's filter is the 11-tap maximally flat
// half-band [3 0 -25 0 150 256 150 0 -25 0 3]/512 (coefficients from
// ddc_pkg). Only the three non-zero symmetric pairs and the centre tap are
// evaluated: three pre-additions, three constant multiplications and the
// centre shift, then rounding by 2^8 and a shift right by 9.
//
// Timing: on each i_valid the sample enters an 11-word delay line. On
// every second valid sample (the 2nd, 4th, ...) the filter output over the
// window ending at that sample is produced; o_valid pulses 2 clocks after
// that input. Output k is sum_j c[j] * x[2k+1-j]. Asynchronous active-low
// reset clears the delay line.
module hb_decimator #(
  parameter int W = ddc_pkg::FILT_W
) (
  input  logic                i_clk,
  input  logic                i_rst_n,
  input  logic                i_valid,
  input  logic signed [W-1:0] i_data,
  output logic                o_valid,
  output logic signed [W-1:0] o_data
);
  import ddc_pkg::*;

  localparam int TAPS = HB_TAPS;
  localparam int ACC_W = W + 12;
  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [W-1:0] sr [TAPS];
  logic                phase, fire;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int k = 0; k < TAPS; k++) sr[k] <= '0;
      phase <= 1'b0;
      fire  <= 1'b0;
    end else begin
      fire <= i_valid && phase;
      if (i_valid) begin
        sr[0] <= i_data;
        for (int k = 1; k < TAPS; k++) sr[k] <= sr[k-1];
        phase <= ~phase;
      end
    end
  end

  // Folded sum over the non-zero taps
  acc_t sum;
  always_comb begin
    sum = acc_t'(sr[TAPS/2]) * acc_t'(hb_coef(TAPS/2));
    for (int k = 0; k < TAPS/2; k += 2)
      sum += (acc_t'(sr[k]) + acc_t'(sr[TAPS-1-k])) * acc_t'(hb_coef(k));
  end

  acc_t rounded;
  always_comb rounded = (sum + (acc_t'(1) <<< (HB_SHIFT - 1))) >>> HB_SHIFT;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_data  <= '0;
      o_valid <= 1'b0;
    end else begin
      o_valid <= fire;
      if (fire) begin
        if (rounded > acc_t'(2**(W-1) - 1))   o_data <= {1'b0, {(W-1){1'b1}}};
        else if (rounded < -acc_t'(2**(W-1))) o_data <= {1'b1, {(W-1){1'b0}}};
        else                                  o_data <= rounded[W-1:0];
      end
    end
  end

endmodule
