// tb_fir_shaping: random 16-bit input, mostly every clock with some idle
// cycles. Each output must equal floor((sum_k h[k]*x[n-k] + 512) / 1024)
// for the 15 shaping coefficients, saturated to 16 bits, and follow its
// input by exactly 4 clocks; one output per input.
module tb_fir_shaping;
  localparam int NIN = 3000;
  localparam int H [15] = '{2, 6, 0, -34, -41, 79, 295, 410, 295, 79, -41, -34, 0, 6, 2};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               vin, vout;
  logic signed [15:0] din, dout;

  fir_shaping #(.W(16)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_data(din),
                             .o_valid(vout), .o_data(dout));

  int checks = 0, failures = 0, sats = 0;
  int x [NIN];
  int vcyc [NIN];
  int nin = 0, kout = 0, cyc = 0;

  initial begin
    vin = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (kout < NIN) begin
      vin = (nin < NIN) && ($urandom_range(0, 4) != 0);
      // occasional full-scale bursts drive the output into saturation
      if ((nin / 100) % 7 == 3) din = (nin % 2 == 1) ? 16'sh7fff : 16'sh7000;
      else                      din = 16'($urandom);
      if (vin) begin
        x[nin] = int'(din);
        vcyc[nin] = cyc;
        nin++;
      end
      @(negedge clk);
      cyc++;
      if (vout) begin
        longint s, e;
        s = 0;
        for (int j = 0; j < 15; j++) if (kout - j >= 0) s += longint'(H[j]) * longint'(x[kout - j]);
        e = (s + 512) >>> 10;
        if (e > 32767)  begin e = 32767;  sats++; end
        if (e < -32768) begin e = -32768; sats++; end
        checks++;
        if (longint'(dout) != e || cyc != vcyc[kout] + 4) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d got %0d exp %0d", kout, dout, e);
        end
        kout++;
      end
      if (cyc > 10 * NIN) break;
    end
    checks++;
    if (sats == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
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
