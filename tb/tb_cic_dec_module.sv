// tb_cic_dec_module: checks the CIC / half-band / FIR chain as a whole.
//  * rate: o_cic_fp pulses exactly every 64 clocks (decimation 32 * 2);
//  * DC gain 1: constant inputs 50 and -77 settle to exactly 50 and -77;
//  * pass band: a tone of amplitude 100 at f_clk/1024 comes out with
//    amplitude 93..103 (the CIC droop there is below 0.5 %);
//  * stop band: a tone at 0.2*f_clk is suppressed to at most 2 LSB.
module tb_cic_dec_module;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0] din, dout;
  logic              fp;

  cic_dec_module dut (.i_fpga_clk(clk), .i_rst_n(rst_n), .i_cic_data(din),
                      .o_cic_data(dout), .o_cic_fp(fp));

  int checks = 0, failures = 0;
  int cyc = 0, last_fp = -1, nfp = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && fp) begin
    if (last_fp >= 0) begin
      checks++;
      if (cyc - last_fp != 64) begin
        failures++;
        $display("FAIL fp spacing %0d", cyc - last_fp);
      end
    end
    last_fp <= cyc;
    nfp++;
  end

  // Drive ncyc samples of a*cos(2*pi*f*n) + dc, return min/max of the last
  // outputs (after 'skip' outputs)
  task automatic drive(input real a, input real f, input int dc, input int ncyc,
                       input int skip, output int omin, output int omax);
    int seen;
    seen = 0; omin = 1000; omax = -1000;
    for (int n = 0; n < ncyc; n++) begin
      din = 8'($rtoi($floor(a * $cos(2.0 * PI * f * n) + real'(dc) + 0.5)));
      @(negedge clk);
      if (fp) begin
        seen++;
        if (seen > skip) begin
          if (int'(dout) < omin) omin = int'(dout);
          if (int'(dout) > omax) omax = int'(dout);
        end
      end
    end
  endtask

  initial begin
    int lo, hi;
    din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    drive(0.0, 0.0, 50, 64 * 40, 20, lo, hi);
    checks++;
    if (lo != 50 || hi != 50) begin failures++; $display("FAIL DC 50: %0d..%0d", lo, hi); end

    drive(0.0, 0.0, -77, 64 * 40, 20, lo, hi);
    checks++;
    if (lo != -77 || hi != -77) begin failures++; $display("FAIL DC -77: %0d..%0d", lo, hi); end

    drive(100.0, 1.0 / 1024.0, 0, 64 * 80, 30, lo, hi);
    checks++;
    if (hi < 93 || hi > 103 || lo > -93 || lo < -103) begin
      failures++; $display("FAIL pass band: %0d..%0d", lo, hi);
    end
    $display("pass band tone: %0d..%0d", lo, hi);

    drive(100.0, 0.2, 0, 64 * 60, 30, lo, hi);
    checks++;
    if (hi > 2 || lo < -2) begin failures++; $display("FAIL stop band: %0d..%0d", lo, hi); end
    $display("stop band tone: %0d..%0d", lo, hi);

    checks++;
    if (nfp < 200) begin failures++; $display("FAIL only %0d outputs", nfp); end
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
