// tb_hb_decimator: random 16-bit input with random idle cycles. Output k
// must equal floor((sum_j c[j]*x[2k+1-j] + 256) / 512) with the half-band
// coefficients c = [3 0 -25 0 150 256 150 0 -25 0 3], appear 2 clocks after
// input 2k+1, and there must be exactly one output per two inputs.
module tb_hb_decimator;
  localparam int NIN = 3000;
  localparam int C [11] = '{3, 0, -25, 0, 150, 256, 150, 0, -25, 0, 3};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               vin, vout;
  logic signed [15:0] din, dout;

  hb_decimator #(.W(16)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(vin), .i_data(din),
                              .o_valid(vout), .o_data(dout));

  int checks = 0, failures = 0;
  int x [NIN];
  int vcyc [NIN];
  int nin = 0, kout = 0, cyc = 0;

  initial begin
    vin = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (nin < NIN) begin
      vin = ($urandom_range(0, 3) != 0);
      din = 16'($signed($urandom_range(0, 40000)) - 20000);
      if (vin) begin
        x[nin] = int'(din);
        vcyc[nin] = cyc;
        nin++;
      end
      @(negedge clk);
      cyc++;
      if (vout) begin
        longint s;
        int n, e;
        n = 2 * kout + 1;
        s = 0;
        for (int j = 0; j < 11; j++) if (n - j >= 0) s += longint'(C[j]) * longint'(x[n - j]);
        e = int'((s + 256) >>> 9);
        checks++;
        if (int'(dout) != e || cyc != vcyc[n] + 2) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d got %0d exp %0d", kout, dout, e);
        end
        kout++;
      end
    end
    vin = 1'b0;
    repeat (3) begin
      @(negedge clk);
      if (vout) kout++;
    end
    checks++;
    if (kout != NIN / 2) begin
      failures++;
      $display("FAIL %0d outputs", kout);
    end
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
