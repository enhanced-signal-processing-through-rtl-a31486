// tb_dds_module: self-checking testbench for the CORDIC NCO.
// After reset the phase accumulator starts from 0 and advances by
// i_nco << 14 per clock, so the output after clock edge m must be
// round(127*cos(2*pi*(m-23)*inc/2^24)) (and sine), m >= 23, within 1 LSB.
// Two frequency words are run, one slow (i_nco = 8, as the published
// simulation) and one fast (i_nco = 123) that visits all four quadrants
// every few samples; output samples whose angle lies in the folded half
// [pi/2, 3*pi/2) are counted and must occur.
module tb_dds_module;
  localparam int LAT = 23;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]        nco;
  logic signed [7:0] cosv, sinv;

  dds_module dut (.i_fpga_clk(clk), .i_rst_n(rst_n), .i_nco(nco), .o_cos(cosv), .o_sin(sinv));

  int checks = 0, failures = 0, folds = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run(input int fcw, input int nsamp);
    longint inc;
    nco = 9'(fcw);
    inc = longint'(fcw) << 14;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int m = 1; m <= nsamp + LAT; m++) begin
      @(negedge clk);   // after edge m
      if (m >= LAT) begin
        real ph, ec, es;
        longint pw;
        pw = ((longint'(m) - longint'(LAT)) * inc) % (longint'(1) << 24);
        // angles in [pi/2, 3*pi/2) are the ones the NCO must fold
        if (pw >= (longint'(1) << 22) && pw < (longint'(3) << 22)) folds++;
        ph = 2.0 * PI * real'(pw) / (2.0 ** 24);
        ec = 127.0 * $cos(ph);
        es = 127.0 * $sin(ph);
        checks++;
        if (fabs(real'(cosv) - ec) > 1.01 || fabs(real'(sinv) - es) > 1.01) begin
          failures++;
          if (failures < 10) $display("FAIL fcw=%0d m=%0d got %0d,%0d exp %f,%f", fcw, m, cosv, sinv, ec, es);
        end
      end
    end
  endtask

  initial begin
    nco = '0;
    run(8, 3000);
    run(123, 1000);
    checks++;
    if (folds == 0) begin
      failures++;
      $display("FAIL quadrant folding never happened");
    end
    $display("quadrant folds: %0d", folds);
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
