// tb_ddc_module: one DDC channel end to end. A complex tone of amplitude 100
// at f_in = k_in * f_clk/1024 is downconverted by an NCO word of 8
// (f_nco = 8 * f_clk/1024), like the published 0.5 MHz input / 0.4 MHz NCO
// example. The baseband output must then be a tone at f_in - f_nco:
//  * its magnitude sqrt(I^2 + Q^2) lies in 85..105 once settled;
//  * its phase advances by 360 * (k_in - 8) * 64 / 1024 degrees per output
//    sample (+45 for k_in = 10, -45 for k_in = 6), within 4 degrees;
//  * outputs come exactly every 64 clocks.
module tb_ddc_module;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]        nco;
  logic signed [7:0] si, sq, oi, oq;
  logic              fp;

  ddc_module dut (.i_fpga_clk(clk), .i_rst_n(rst_n), .i_nco(nco), .i_signal_i(si), .i_signal_q(sq),
                  .o_ddc_i(oi), .o_ddc_q(oq), .o_ddc_fp(fp));

  int checks = 0, failures = 0;

  function automatic real wrap180(input real d);
    while (d > 180.0)   d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  task automatic run(input int kin, input int nout);
    real prev, ph, mag, step, expstep;
    int seen, last, cyc;
    expstep = wrap180(360.0 * real'(kin - 8) * 64.0 / 1024.0);
    nco = 9'd8;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    seen = 0; cyc = 0; last = 0; prev = 0.0;
    while (seen < nout) begin
      si = 8'($rtoi($floor(100.0 * $cos(2.0 * PI * kin * cyc / 1024.0 + 0.3) + 0.5)));
      sq = 8'($rtoi($floor(100.0 * $sin(2.0 * PI * kin * cyc / 1024.0 + 0.3) + 0.5)));
      @(negedge clk);
      cyc++;
      if (fp) begin
        seen++;
        ph  = $atan2(real'(oq), real'(oi)) * 180.0 / PI;
        mag = $sqrt(real'(oi) * real'(oi) + real'(oq) * real'(oq));
        if (seen > 25) begin
          step = wrap180(ph - prev);
          checks += 3;
          if (mag < 85.0 || mag > 105.0) begin
            failures++; $display("FAIL k_in=%0d magnitude %f", kin, mag);
          end
          if (step - expstep > 4.0 || expstep - step > 4.0) begin
            failures++; $display("FAIL k_in=%0d phase step %f exp %f", kin, step, expstep);
          end
          if (cyc - last != 64) begin
            failures++; $display("FAIL output spacing %0d", cyc - last);
          end
        end
        prev = ph;
        last = cyc;
      end
    end
  endtask

  initial begin
    si = '0; sq = '0; nco = '0;
    run(10, 60);
    run(6, 60);
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
