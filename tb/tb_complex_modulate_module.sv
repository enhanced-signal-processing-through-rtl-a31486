// tb_complex_modulate_module: random 8-bit inputs every clock; the output two
// clocks later must equal i*cos + q*sin computed in the testbench.
module tb_complex_modulate_module;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0]  id, qd, c, s;
  logic signed [15:0] o;

  complex_modulate_module dut (.i_fpga_clk(clk), .i_rst_n(rst_n), .i_idata(id), .i_qdata(qd),
                               .i_dds_cos(c), .i_dds_sin(s), .o_ddc_modulate(o));

  int checks = 0, failures = 0;
  int exp_q [$];

  initial begin
    id = '0; qd = '0; c = '0; s = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      id = 8'($urandom); qd = 8'($urandom);
      c  = 8'($signed($urandom_range(0, 254)) - 127);
      s  = 8'($signed($urandom_range(0, 254)) - 127);
      exp_q.push_back(int'(id) * int'(c) + int'(qd) * int'(s));
      @(negedge clk);
      if (n >= 1) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(o) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, o, e);
        end
      end
    end
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
