// tb_fft_core: frames of 64 random complex 8-bit samples, spaced 5..8 clocks
// apart. Every streamed bin is compared with the DFT computed in floating
// point, X[k] = (128/64) * sum_n x[n] exp(-j 2 pi k n / 64), within 4 LSB;
// bins must come out in order 0..63 with o_last on bin 63, and the first
// bin must follow the last sample of its frame by exactly 6*32 + 1 clocks
// plus the output register (194 clocks).
module tb_fft_core;
  localparam int N = 64;
  localparam int NFRAMES = 6;
  localparam int LAT = 6 * 32 + 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               vin, vout, last;
  logic signed [7:0]  re, im;
  logic [5:0]         bin;
  logic signed [15:0] ore, oim;

  fft_core #(.N(N), .IN_W(8), .W(16)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_re(re), .i_im(im),
                                         .o_valid(vout), .o_bin(bin), .o_last(last), .o_re(ore), .o_im(oim));

  int checks = 0, failures = 0;
  int xr [NFRAMES][N], xi [NFRAMES][N];
  int last_cyc [NFRAMES];
  int cyc = 0, fout = 0, kout = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    vin = 1'b0; re = '0; im = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < N; n++) begin
        repeat ($urandom_range(4, 7)) @(negedge clk);
        vin = 1'b1;
        re = 8'($urandom); im = 8'($urandom);
        if (f == 1) begin   // a pure on-bin tone in one frame
          re = 8'($rtoi($floor(100.0 * $cos(2.0 * PI * 5 * n / N) + 0.5)));
          im = 8'($rtoi($floor(100.0 * $sin(2.0 * PI * 5 * n / N) + 0.5)));
        end
        xr[f][n] = int'(re); xi[f][n] = int'(im);
        if (n == N - 1) last_cyc[f] = cyc;
        @(negedge clk);
        vin = 1'b0;
      end
    repeat (400) @(negedge clk);
    checks++;
    if (fout != NFRAMES) begin failures++; $display("FAIL %0d frames out", fout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && vout) begin
    real er, ei;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < N; n++) begin
      real a;
      a = -2.0 * PI * real'(kout * n) / N;
      er += real'(xr[fout][n]) * $cos(a) - real'(xi[fout][n]) * $sin(a);
      ei += real'(xr[fout][n]) * $sin(a) + real'(xi[fout][n]) * $cos(a);
    end
    er = er * 128.0 / N; ei = ei * 128.0 / N;
    checks++;
    if (real'(ore) - er > 4.0 || er - real'(ore) > 4.0 || real'(oim) - ei > 4.0 || ei - real'(oim) > 4.0 ||
        int'(bin) != kout || last != (kout == N - 1) ||
        (kout == 0 && cyc != last_cyc[fout] + LAT)) begin
      failures++;
      if (failures < 10) $display("FAIL frame %0d bin %0d/%0d got (%0d,%0d) exp (%f,%f) cyc %0d", fout, bin, kout, ore, oim, er, ei, cyc - last_cyc[fout]);
    end
    if (kout == N - 1) begin kout = 0; fout++; end
    else kout++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
