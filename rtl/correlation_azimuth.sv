// correlation_azimuth: turns the phase differences of the five channels into
// a bearing, by channel calibration and correlation against the phase
// pattern the antenna array would see from each candidate azimuth.
//
// Calibration: a frame presented with i_cal = 1 comes from a calibration
// source that feeds the same signal to every channel, so its phase
// differences are the channels' own phase errors. They are stored, and
// subtracted from the differences of every later frame (they are zero
// until the first calibration).
//
// Correlation: for a measured frame (i_cal = 0) the block scans NAZ
// candidate azimuths theta_a = a * 360 / NAZ degrees, one per clock. For each
// it forms
//   score(a) = sum_{k=1..NCH-1} cos(d_k - ref_k(a)),
// where d_k is the corrected difference of channel k to channel 0, and
//   ref_k(a) = R * (cos(theta_a - 2*pi*k/NCH) - cos(theta_a))   [turns]
// is the difference expected from a uniform circular array of NCH elements,
// radius R wavelengths, element k at angle 2*pi*k/NCH. The azimuth with the
// highest score is the result; ties keep the lower azimuth. The cosine is a
// 2^CB-entry table indexed by the rounded top CB bits of the angle, scaled
// by 2^(CB) (so a perfect match scores (NCH-1) * 2^CB). Both tables are
// computed at elaboration.
//
// The receiver this design follows corrects the channels with calibration
// data and outputs the azimuth of the highest correlation; it gives neither
// the array, the grid, the score nor the calibration procedure. The circular
// array, R = 0.5 wavelength (R_MILLI = 500), the 5-degree grid (NAZ = 72) and
// the cosine score are this design's choices.
//
// Interface and timing: i_valid with i_diff (signed fractions of a turn,
// 2^Z_W = 360 degrees). A calibration frame is stored on that clock and
// o_cal_valid pulses one clock later. A measured frame sets o_busy for NAZ
// clocks; o_valid then pulses with o_azimuth (in units of 360/NAZ degrees)
// and o_score, which hold until the next result. A frame offered while
// o_busy is high is a protocol error (checked by an assertion); frames
// arrive thousands of clocks apart in this receiver. Asynchronous
// active-low reset.
module correlation_azimuth #(
  parameter int NCH     = 5,
  parameter int Z_W     = 16,
  parameter int NAZ     = 72,
  parameter int R_MILLI = 500,
  parameter int CB      = 8
) (
  input  logic                       i_clk,
  input  logic                       i_rst_n,
  input  logic                       i_valid,
  input  logic                       i_cal,
  input  logic signed [Z_W-1:0]      i_diff [NCH],
  output logic                       o_cal_valid,
  output logic                       o_busy,
  output logic                       o_valid,
  output logic [$clog2(NAZ)-1:0]     o_azimuth,
  output logic signed [15:0]         o_score
);
  localparam int  AW = $clog2(NAZ);
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [Z_W-1:0] ang_t;
  typedef ang_t                  ref_tab_t [NAZ*NCH];   // entry a*NCH + k
  typedef logic signed [CB+1:0]  cosv_t;
  typedef cosv_t                 cos_tab_t [2**CB];

  function automatic ref_tab_t mk_ref();
    ref_tab_t t;
    for (int a = 0; a < NAZ; a++)
      for (int k = 0; k < NCH; k++) begin
        real th, d;
        th = 2.0 * PI * a / NAZ;
        d  = real'(R_MILLI) / 1000.0 * ($cos(th - 2.0 * PI * k / NCH) - $cos(th));
        t[a*NCH + k] = Z_W'($rtoi($floor(d * real'(2.0 ** Z_W) + 0.5)));
      end
    return t;
  endfunction
  function automatic cos_tab_t mk_cos();
    cos_tab_t t;
    for (int i = 0; i < 2**CB; i++)
      t[i] = (CB+2)'($rtoi($floor($cos(2.0 * PI * i / (2.0 ** CB)) * real'(2 ** CB) + 0.5)));
    return t;
  endfunction
  localparam ref_tab_t REF   = mk_ref();
  localparam cos_tab_t COS_T = mk_cos();

  ang_t                cal  [NCH];
  ang_t                meas [NCH];
  logic [AW-1:0]       az, best_az;
  logic signed [15:0]  best, score;

  // Score of candidate az: cosine of each residual, rounded to CB bits.
  always_comb begin
    score = '0;
    for (int k = 1; k < NCH; k++) begin
      ang_t          r;
      logic [CB-1:0] idx;
      r     = meas[k] - REF[int'(az) * NCH + k];
      idx   = CB'((r + ang_t'(2 ** (Z_W - CB - 1))) >>> (Z_W - CB));
      score = score + 16'(COS_T[idx]);
    end
  end

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int k = 0; k < NCH; k++) begin
        cal[k]  <= '0;
        meas[k] <= '0;
      end
      az          <= '0;
      best_az     <= '0;
      best        <= '0;
      o_cal_valid <= 1'b0;
      o_busy      <= 1'b0;
      o_valid     <= 1'b0;
      o_azimuth   <= '0;
      o_score     <= '0;
    end else begin
      o_cal_valid <= 1'b0;
      o_valid     <= 1'b0;
      if (i_valid && i_cal) begin
        cal         <= i_diff;
        o_cal_valid <= 1'b1;
      end else if (i_valid && !o_busy) begin
        for (int k = 0; k < NCH; k++) meas[k] <= i_diff[k] - cal[k];
        az     <= '0;
        o_busy <= 1'b1;
      end
      if (o_busy) begin
        if (az == '0 || score > best) begin
          best    <= score;
          best_az <= az;
        end
        if (az == AW'(NAZ - 1)) begin
          o_busy    <= 1'b0;
          o_valid   <= 1'b1;
          o_azimuth <= (score > best) ? az : best_az;
          o_score   <= (score > best) ? score : best;
        end else begin
          az <= az + 1'b1;
        end
      end
    end
  end

  a_no_overrun: assert property (@(posedge i_clk) disable iff (!i_rst_n) i_valid |-> !o_busy);

endmodule
