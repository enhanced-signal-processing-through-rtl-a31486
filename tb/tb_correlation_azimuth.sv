// tb_correlation_azimuth: direction finding from phase differences.
// A five-element uniform circular array of radius 0.5 wavelength is modelled
// in floating point. For every candidate azimuth (0, 5, ... 355 degrees),
// shifted off the grid by up to +-2 degrees, the test first presents a
// calibration frame that holds only random per-channel phase errors, then a
// measured frame holding the array's phase differences plus the same errors
// plus up to +-2 degrees of noise. The block must report the nearest grid
// azimuth with a score of at least 90 % of a perfect match, raise o_busy for
// exactly NAZ clocks and pulse o_valid NAZ clocks after the frame, and pulse
// o_cal_valid one clock after each calibration frame. The first trial runs
// before any calibration, with no channel errors.
module tb_correlation_azimuth;
  localparam int  NCH = 5, NAZ = 72, Z_W = 16;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 vin, cal, cal_v, busy, vout;
  logic signed [15:0]   diff [NCH];
  logic [6:0]           az;
  logic signed [15:0]   score;

  correlation_azimuth #(.NCH(NCH), .Z_W(Z_W), .NAZ(NAZ), .R_MILLI(500), .CB(8)) dut (
    .i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_cal(cal), .i_diff(diff),
    .o_cal_valid(cal_v), .o_busy(busy), .o_valid(vout), .o_azimuth(az), .o_score(score));

  int checks = 0, failures = 0, n_cal = 0;

  function automatic logic signed [15:0] turns(input real deg);
    return 16'($rtoi($floor(deg / 360.0 * 65536.0 + 0.5)));
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 10001) / 10000.0;
  endfunction

  task automatic present(input logic is_cal, input real deg [NCH]);
    @(negedge clk);
    vin = 1'b1; cal = is_cal;
    for (int k = 0; k < NCH; k++) diff[k] = turns(deg[k] - deg[0]);
    @(negedge clk);
    vin = 1'b0; cal = 1'b0;
  endtask

  initial begin
    vin = 1'b0; cal = 1'b0;
    for (int k = 0; k < NCH; k++) diff[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < NAZ; t++) begin
      int  a, nbusy, lat;
      real th, err [NCH], ph [NCH], zero [NCH];
      a  = (t * 29) % NAZ;
      th = real'(a) * 360.0 / NAZ + ((t == 0) ? 0.0 : rnd(-2.0, 2.0));
      for (int k = 0; k < NCH; k++) begin
        err[k]  = (t == 0) ? 0.0 : rnd(-180.0, 180.0);
        zero[k] = 0.0;
      end
      if (t > 0) begin
        present(1'b1, err);
        checks++;
        if (!cal_v) begin failures++; $display("FAIL no o_cal_valid"); end
        else n_cal++;
      end
      for (int k = 0; k < NCH; k++)
        ph[k] = 360.0 * 0.5 * $cos((th - 360.0 * k / NCH) * PI / 180.0) + err[k] + rnd(-2.0, 2.0);
      present(1'b0, ph);
      // o_busy for NAZ clocks, then o_valid
      nbusy = 0; lat = 0;
      while (!vout && lat < 4 * NAZ) begin
        if (busy) nbusy++;
        @(negedge clk);
        lat++;
      end
      checks += 4;
      if (lat != NAZ) begin failures++; $display("FAIL latency %0d", lat); end
      if (nbusy != NAZ) begin failures++; $display("FAIL busy %0d clocks", nbusy); end
      if (int'(az) != a) begin failures++; $display("FAIL azimuth %0d exp %0d (theta %f)", az, a, th); end
      if (score < 16'sd922) begin failures++; $display("FAIL score %0d", score); end
      repeat ($urandom % 5) @(negedge clk);
    end
    checks++;
    if (n_cal == 0) begin failures++; $display("FAIL no calibration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
