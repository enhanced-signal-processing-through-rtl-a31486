// tb_ddc_round: random and extreme 16-bit inputs; the registered output one
// clock later must be floor((x + 64) / 128) clipped to [-128, 127].
module tb_ddc_round;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] d;
  logic signed [7:0]  o;

  ddc_round dut (.i_fpga_clk(clk), .i_rst_n(rst_n), .i_data(d), .o_data(o));

  int checks = 0, failures = 0, sats = 0;

  function automatic int model(input int x);
    int r;
    r = x + 64;
    r = (r >= 0) ? r / 128 : -((-r + 127) / 128);   // floor division
    if (r > 127)  r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int e;
      case (n % 10)
        0: d = 16'sh7fff;
        1: d = -16'sh8000;
        2: d = 16'(16320 + $urandom_range(0, 200));
        default: d = 16'($urandom);
      endcase
      e = model(int'(d));
      if (e == 127 || e == -128) sats++;
      @(negedge clk);
      checks++;
      if (int'(o) != e) begin
        failures++;
        if (failures < 10) $display("FAIL in=%0d got %0d exp %0d", d, o, e);
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
