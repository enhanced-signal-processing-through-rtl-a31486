// tb_peak_select: frames of 64 bins on five channels with random values,
// occasional idle cycles, and a planted peak on channel 0 at a random bin
// (including the first and the last bin); in some frames the last bin
// repeats the peak's power, and the earlier bin must win. One clock after the last bin the
// block must report the bin with the largest re^2 + im^2 of channel 0, that
// power, and the same bin's value from every channel.
module tb_peak_select;
  localparam int NCH = 5, N = 64, NFR = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               vin, lin, vout;
  logic [5:0]         bin, obin;
  logic signed [15:0] re [NCH], im [NCH], ore [NCH], oim [NCH];
  logic [32:0]        opow;

  peak_select #(.NCH(NCH), .W(16), .N(N)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_bin(bin),
    .i_last(lin), .i_re(re), .i_im(im), .o_valid(vout), .o_bin(obin), .o_power(opow), .o_re(ore), .o_im(oim));

  int checks = 0, failures = 0, nout = 0, n_tie = 0;

  initial begin
    vin = 1'b0; lin = 1'b0; bin = '0;
    for (int c = 0; c < NCH; c++) begin re[c] = '0; im[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < NFR; f++) begin
      int pk, bestk;
      longint best;
      logic signed [15:0] er [NCH], ei [NCH];
      pk = (f % 3 == 0) ? 0 : (f % 3 == 1) ? N - 1 : $urandom_range(0, N - 1);
      best = -1; bestk = 0;
      for (int k = 0; k < N; k++) begin
        longint p;
        while ($urandom_range(0, 3) == 0) begin vin = 1'b0; @(negedge clk); end
        vin = 1'b1; bin = 6'(k); lin = (k == N - 1);
        for (int c = 0; c < NCH; c++) begin
          re[c] = 16'($signed($urandom_range(0, 4000)) - 2000);
          im[c] = 16'($signed($urandom_range(0, 4000)) - 2000);
        end
        if (k == pk) begin re[0] = 16'(20000 + f); im[0] = -16'sd9000; end
        // tie: the same power again at the last bin, which must lose
        if (f % 4 == 2 && pk < N - 1 && k == N - 1) begin re[0] = -16'(20000 + f); im[0] = 16'sd9000; n_tie++; end
        p = longint'(re[0]) * re[0] + longint'(im[0]) * im[0];
        if (p > best) begin
          best = p; bestk = k;
          for (int c = 0; c < NCH; c++) begin er[c] = re[c]; ei[c] = im[c]; end
        end
        @(negedge clk);
        vin = 1'b0; lin = 1'b0;
        if (k == N - 1) begin
          checks++;
          if (!vout || int'(obin) != bestk || longint'(opow) != best) begin
            failures++;
            $display("FAIL frame %0d: valid %0d bin %0d exp %0d power %0d exp %0d", f, vout, obin, bestk, opow, best);
          end
          for (int c = 0; c < NCH; c++) begin
            checks++;
            if (ore[c] != er[c] || oim[c] != ei[c]) begin
              failures++;
              if (failures < 10) $display("FAIL frame %0d ch%0d value", f, c);
            end
          end
          nout++;
        end
      end
    end
    checks++;
    if (n_tie == 0) begin failures++; $display("FAIL no tie tested"); end
    $display("ties %0d", n_tie);
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
