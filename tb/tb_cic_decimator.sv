// tb_cic_decimator: random 8-bit input with random idle cycles. The
// reference is the direct (non-recursive) form of the CIC: the impulse
// response h = three cascaded length-R*M boxcars, convolved with the input
// history. Output k must equal sum_j h[j]*x[n-j] with n = (k+1)*R - 1 - N,
// and o_valid must pulse once per R valid inputs, one clock after the R-th.
module tb_cic_decimator;
  localparam int N = 3, R = 32, M = 1;
  localparam int L = N * (R * M - 1) + 1;
  localparam int NIN = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              vin, vout;
  logic signed [7:0] din;
  logic signed [22:0] dout;

  cic_decimator #(.IN_W(8), .N(N), .R(R), .M(M)) dut (
    .i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_data(din), .o_valid(vout), .o_data(dout));

  int checks = 0, failures = 0;
  int x [NIN];
  longint h [L];
  int nin = 0, kout = 0, last_valid_cyc = -100, cyc = 0;

  initial begin
    // h = boxcar * boxcar * boxcar
    longint a [L], b [L];
    for (int j = 0; j < L; j++) a[j] = (j < R * M) ? 1 : 0;
    for (int s = 1; s < N; s++) begin
      for (int j = 0; j < L; j++) begin
        b[j] = 0;
        for (int t = 0; t < R * M; t++) if (j - t >= 0) b[j] += a[j - t];
      end
      a = b;
    end
    h = a;
    vin = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (nin < NIN) begin
      vin = ($urandom_range(0, 9) != 0);
      din = 8'($urandom);
      if (vin) begin
        x[nin] = int'(din);
        nin++;
        if (nin % R == 0) last_valid_cyc = cyc;
      end
      @(negedge clk);
      cyc++;
    end
    vin = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (kout != NIN / R) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", kout, NIN / R);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker (sampled after each rising edge)
  always @(negedge clk) if (rst_n && vout) begin
    longint e;
    int n;
    n = (kout + 1) * R - 1 - N;
    e = 0;
    for (int j = 0; j < L; j++) if (n - j >= 0) e += h[j] * longint'(x[n - j]);
    checks++;
    if (longint'(dout) != e || cyc != last_valid_cyc + 1) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d got %0d exp %0d (cyc %0d last %0d)", kout, dout, e, cyc, last_valid_cyc);
    end
    kout++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
