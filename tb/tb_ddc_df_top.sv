// tb_ddc_df_top: end-to-end test of the five-channel DDC direction-finding
// front end at its default parameters.
// One tone (amplitude 100, f_in = 10 * f_clk/1024) reaches the five
// channels. The channels have phase errors of -100, -70, 20, 110 and 170
// degrees. For the first three FFT frames the tone comes from a calibration
// source, so only those errors are seen, and i_cal is high. With the NCO
// word 8 every channel is downconverted to 2 * f_clk/1024, which is 1/8 of
// the decimated rate and so FFT bin 8 of 64. Then the NCO word is switched to
// 12, which moves the tone to -2 * f_clk/1024, bin 56. At the same time the
// tone starts arriving from azimuth 130 degrees at a five-element circular
// array of radius 0.5 wavelength, which adds 180 * cos(130 - 72 k) degrees
// to channel k. From the second frame after each setting on (the first one
// holds the filters' start-up transient), every result must satisfy these
// conditions:
//  * the peak bin is 8 (then 56);
//  * the peak magnitude is 85..105 % of 100 * 128 (the FFT's scale);
//  * the phase differences to channel 0 match the inputs within 3 degrees
//    (some wrap through 180 degrees);
//  * after calibration: the azimuth is 130 degrees (grid index 26) with a
//    score of at least 90 % of a perfect match.
// Decimated outputs must come every 64 clocks. Each of these mechanisms is
// counted and must occur: decimated outputs, FFT frames, NCO quadrant
// folding, wrapped differences, the NCO frequency switch, the move of the
// peak bin, calibrations and azimuth results.
module tb_ddc_df_top;
  import ddc_pkg::*;
  localparam int NCH = 5;
  localparam real PI = 3.14159265358979323846;
  localparam real OFS [NCH] = '{-100.0, -70.0, 20.0, 110.0, 170.0};
  localparam real AZ_DEG    = 130.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]         nco;
  sample_t            si [NCH], sq [NCH], oi [NCH], oq [NCH];
  logic               fp, pv, cal, calv, busy, azv;
  logic [6:0]         az;
  logic signed [15:0] azs;
  logic               geo_on;
  real                geo [NCH];
  logic signed [15:0] ph [NCH], pd [NCH];
  logic [5:0]         pbin;
  logic [32:0]        ppow;

  ddc_df_top dut (
    .i_fpga_clk(clk), .i_rst_n(rst_n), .i_nco(nco),
    .i_signal_i(si), .i_signal_q(sq), .o_ddc_i(oi), .o_ddc_q(oq), .o_ddc_fp(fp),
    .o_phase_valid(pv), .o_peak_bin(pbin), .o_peak_power(ppow),
    .o_phase(ph), .o_phase_diff(pd), .i_cal(cal), .o_cal_valid(calv), .o_df_busy(busy),
    .o_az_valid(azv), .o_azimuth(az), .o_az_score(azs)
  );

  int checks = 0, failures = 0;
  int n_fp = 0, n_pv = 0, n_fold = 0, n_wrap = 0, n_switch = 0, n_binmove = 0, last_bin = -1;
  int cyc = 0, last_fp = -1, pv_seen = 0, n_cal = 0, n_az = 0;

  function automatic real wrap180(input real d);
    while (d >= 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  // Reference NCO phase (24 bits, advanced by i_nco << 14 per clock); a
  // phase in [pi/2, 3*pi/2) is one the NCO has to fold into [-pi/2, pi/2).
  logic [23:0] ref_phase = '0;
  always @(posedge clk) begin
    if (!rst_n) ref_phase <= '0;
    else begin
      ref_phase <= ref_phase + (24'(nco) << 14);
      if (ref_phase >= 24'h40_0000 && ref_phase < 24'hC0_0000) n_fold++;
    end
  end

  task automatic run_phase(input int nout, input int exp_bin);
    int seen, extra;
    seen = 0; extra = 0;
    // run on for 100 clocks after the last result, for its azimuth
    while (extra < 100) begin
      if (seen >= nout) extra++;
      for (int c = 0; c < NCH; c++) begin
        real a;
        a = 2.0 * PI * 10.0 * real'(cyc) / 1024.0 + (OFS[c] + (geo_on ? geo[c] : 0.0)) * PI / 180.0;
        si[c] = 8'($rtoi($floor(100.0 * $cos(a) + 0.5)));
        sq[c] = 8'($rtoi($floor(100.0 * $sin(a) + 0.5)));
      end
      @(negedge clk);
      cyc++;
      if (fp) begin
        n_fp++;
        if (last_fp >= 0) begin
          checks++;
          if (cyc - last_fp != 64) begin failures++; $display("FAIL fp spacing %0d", cyc - last_fp); end
        end
        last_fp = cyc;
      end
      if (calv) n_cal++;
      if (azv) begin
        n_az++;
        if (geo_on && seen >= 2) begin
          checks += 2;
          if (int'(az) != int'(AZ_DEG / 5.0)) begin
            failures++; $display("FAIL azimuth %0d exp %0d", az, int'(AZ_DEG / 5.0));
          end
          if (azs < 16'sd922) begin failures++; $display("FAIL azimuth score %0d", azs); end
        end
      end
      if (pv) begin
        n_pv++;
        seen++;
        if (seen >= 2) begin
          real mag;
          mag = $sqrt(real'(ppow));
          checks += 2;
          if (int'(pbin) != exp_bin) begin
            failures++; $display("FAIL peak bin %0d exp %0d", pbin, exp_bin);
          end
          if (mag < 0.85 * 12800.0 || mag > 1.05 * 12800.0) begin
            failures++; $display("FAIL peak magnitude %f", mag);
          end
          if (last_bin >= 0 && int'(pbin) != last_bin) n_binmove++;
          last_bin = int'(pbin);
          for (int c = 0; c < NCH; c++) begin
            real got, raw, exp_d;
            raw   = OFS[c] - OFS[0] + (geo_on ? geo[c] - geo[0] : 0.0);
            exp_d = wrap180(raw);
            if (raw >= 180.0 || raw < -180.0) n_wrap++;
            got = real'(pd[c]) * 360.0 / 65536.0;
            checks++;
            if (wrap180(got - exp_d) > 3.0 || wrap180(got - exp_d) < -3.0) begin
              failures++;
              if (failures < 10) $display("FAIL ch%0d diff %f exp %f (nco %0d)", c, got, exp_d, nco);
            end
          end
        end
      end
    end
  endtask

  initial begin
    nco = 9'd8;
    cal = 1'b1;           // calibration source on
    geo_on = 1'b0;
    for (int c = 0; c < NCH; c++) geo[c] = 180.0 * $cos((AZ_DEG - 72.0 * c) * PI / 180.0);
    for (int c = 0; c < NCH; c++) begin si[c] = '0; sq[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_phase(3, 8);
    nco = 9'd12;          // reprogram all NCOs at once
    n_switch++;
    cal = 1'b0;           // calibration source off, signal from AZ_DEG
    geo_on = 1'b1;
    run_phase(3, 56);

    checks += 8;
    if (n_cal == 0)    begin failures++; $display("FAIL no calibration"); end
    if (n_az == 0)     begin failures++; $display("FAIL no azimuth result"); end
    if (n_binmove == 0) begin failures++; $display("FAIL peak bin never moved"); end
    if (n_fp == 0)     begin failures++; $display("FAIL no decimated output"); end
    if (n_pv == 0)     begin failures++; $display("FAIL no phase result"); end
    if (n_fold == 0)   begin failures++; $display("FAIL no NCO quadrant fold"); end
    if (n_wrap == 0)   begin failures++; $display("FAIL no wrapped difference"); end
    if (n_switch == 0) begin failures++; $display("FAIL no NCO switch"); end
    $display("decimated outputs %0d, FFT frames %0d, NCO folds %0d, wrapped diffs %0d, NCO switches %0d, peak moves %0d, calibrations %0d, azimuth results %0d",
             n_fp, n_pv, n_fold, n_wrap, n_switch, n_binmove, n_cal, n_az);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
