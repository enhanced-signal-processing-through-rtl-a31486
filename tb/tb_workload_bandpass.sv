// tb_workload_bandpass: one DDC channel on a band-pass sampled input.
// A carrier at 384 MHz sampled at 170 MHz aliases to 384 - 2*170 = 44 MHz.
// The NCO word 265 tunes to 265 * 170/1024 = 43.994 MHz. The ADC delivers a
// real signal (i_signal_q = 0), here a tone of amplitude 100 at 44 MHz + d.
// After downconversion the wanted component lies at
// d + 5.86 kHz; the image at -(88 MHz + d) must be removed by the filters.
// The output rate is 170/64 = 2.656 MS/s, and only a narrow slice of the
// 20 MHz signal band passes:
//  * d = +0.3 MHz and d = -0.3 MHz: the output must be a complex tone of
//    magnitude 50 (half the real amplitude) within 40..56, whose phase
//    advances by 360 * (d + 5.86 kHz) * 64 / 170 MHz degrees per output,
//    within 6 degrees;
//  * d = +3 MHz (still inside the 20 MHz band): the output magnitude must
//    stay below 5, because the filters reject it.
// The first 30 outputs after each change are filter settling and are not
// checked; 40 outputs follow. Outputs must come every 64 clocks.
module tb_workload_bandpass;
  import ddc_pkg::*;
  localparam real PI    = 3.14159265358979323846;
  localparam real FS    = 170.0e6;
  localparam real F_IF  = 384.0e6 - 2.0 * 170.0e6;
  localparam int  NCO_W = 265;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [8:0] nco;
  sample_t    si, sq, oi, oq;
  logic       fp;

  ddc_module dut (.i_fpga_clk(clk), .i_rst_n(rst_n), .i_nco(nco), .i_signal_i(si), .i_signal_q(sq),
                  .o_ddc_i(oi), .o_ddc_q(oq), .o_ddc_fp(fp));

  int checks = 0, failures = 0;
  longint cyc = 0;
  int last_fp = -1;

  function automatic real wrap180(input real d);
    while (d >= 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  // Drive a real tone at F_IF + d for 30 + 40 outputs and check the last 40.
  task automatic run_tone(input real d, input logic in_band);
    int  nout;
    real pi_prev, pq_prev, f_out, step_exp;
    f_out    = F_IF + d - real'(NCO_W) * FS / 1024.0;
    step_exp = wrap180(360.0 * f_out * 64.0 / FS);
    nout = 0;
    while (nout < 70) begin
      si = 8'($rtoi($floor(100.0 * $cos(2.0 * PI * (F_IF + d) / FS * real'(cyc)) + 0.5)));
      @(negedge clk);
      cyc++;
      if (fp) begin
        real mi, mq, mag;
        if (last_fp >= 0) begin
          checks++;
          if (int'(cyc) - last_fp != 64) begin failures++; $display("FAIL output spacing %0d", int'(cyc) - last_fp); end
        end
        last_fp = int'(cyc);
        nout++;
        mi  = real'(oi);
        mq  = real'(oq);
        mag = $sqrt(mi * mi + mq * mq);
        if (nout > 30) begin
          if (in_band) begin
            real step;
            checks += 2;
            if (mag < 40.0 || mag > 56.0) begin failures++; $display("FAIL d=%f magnitude %f", d, mag); end
            step = $atan2(mq * pi_prev - mi * pq_prev, mi * pi_prev + mq * pq_prev) * 180.0 / PI;
            if (wrap180(step - step_exp) > 6.0 || wrap180(step - step_exp) < -6.0) begin
              failures++; $display("FAIL d=%f phase step %f exp %f", d, step, step_exp);
            end
          end else begin
            checks++;
            if (mag >= 5.0) begin failures++; $display("FAIL d=%f out-of-band magnitude %f", d, mag); end
          end
        end
        pi_prev = mi;
        pq_prev = mq;
      end
    end
  endtask

  initial begin
    nco = 9'(NCO_W);
    si = '0; sq = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_tone(0.3e6, 1'b1);
    run_tone(-0.3e6, 1'b1);
    run_tone(3.0e6, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
