// tb_phase_diff: random 16-bit complex values on five channels (with
// idle cycles). Each channel's phase must match atan2(Q, I) and each
// difference the wrapped difference to channel 0, both within 0.2 degrees,
// 16 clocks after the input. Differences that wrap through +-180 degrees are
// counted and must occur.
module tb_phase_diff;
  localparam int NCH = 5;
  localparam int LAT = 16;
  localparam int NV  = 2000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               vin, vout;
  logic signed [15:0] vi [NCH], vq [NCH];
  logic signed [15:0] ph [NCH], df [NCH];

  phase_diff #(.NCH(NCH)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_i(vi), .i_q(vq),
                               .o_valid(vout), .o_phase(ph), .o_diff(df));

  int checks = 0, failures = 0, wraps = 0;
  real eph [NV][NCH];
  int  vcyc [NV];
  int  nin = 0, nout = 0, cyc = 0;

  function automatic real wrap180(input real d);
    while (d >= 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  function automatic real deg(input logic signed [15:0] v);
    return real'(v) * 360.0 / 65536.0;
  endfunction

  initial begin
    vin = 1'b0;
    for (int c = 0; c < NCH; c++) begin vi[c] = '0; vq[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (nout < NV) begin
      vin = (nin < NV) && ($urandom_range(0, 3) != 0);
      for (int c = 0; c < NCH; c++) begin
        real a, m;
        a = real'($urandom_range(0, 35999)) * PI / 18000.0;
        m = 200.0 + real'($urandom_range(0, 32000));
        vi[c] = 16'($rtoi($floor(m * $cos(a) + 0.5)));
        vq[c] = 16'($rtoi($floor(m * $sin(a) + 0.5)));
        if (vin) eph[nin][c] = $atan2(real'(vq[c]), real'(vi[c])) * 180.0 / PI;
      end
      if (vin) begin vcyc[nin] = cyc; nin++; end
      @(negedge clk);
      cyc++;
      if (vout) begin
        checks++;
        if (cyc != vcyc[nout] + LAT) begin
          failures++; $display("FAIL latency %0d", cyc - vcyc[nout]);
        end
        for (int c = 0; c < NCH; c++) begin
          real ed, raw;
          raw = eph[nout][c] - eph[nout][0];
          if (raw >= 180.0 || raw < -180.0) wraps++;
          ed = wrap180(raw);
          checks += 2;
          if (wrap180(deg(ph[c]) - eph[nout][c]) > 0.2 || wrap180(deg(ph[c]) - eph[nout][c]) < -0.2) begin
            failures++;
            if (failures < 10) $display("FAIL phase ch%0d got %f exp %f", c, deg(ph[c]), eph[nout][c]);
          end
          if (wrap180(deg(df[c]) - ed) > 0.2 || wrap180(deg(df[c]) - ed) < -0.2) begin
            failures++;
            if (failures < 10) $display("FAIL diff ch%0d got %f exp %f", c, deg(df[c]), ed);
          end
        end
        nout++;
      end
      if (cyc > 10 * NV) break;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around case"); end
    $display("wrapped differences: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
