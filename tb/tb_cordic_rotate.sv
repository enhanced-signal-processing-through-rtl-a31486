// tb_cordic_rotate: self-checking testbench for the rotation-mode CORDIC.
// A new random vector and angle (|angle| <= pi/2) enters every clock; each
// result is compared, exactly STAGES clocks later, with the rotated vector
// computed in floating point: K*(x cos z - y sin z), K*(y cos z + x sin z),
// K = prod sqrt(1 + 2^-2i). The tag word must come out with the same
// latency.
module tb_cordic_rotate;
  localparam int STAGES = 21;
  localparam int XY_W   = 24;
  localparam int Z_W    = 24;
  localparam int NVEC   = 400;
  localparam real PI    = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [XY_W-1:0] ix, iy, ox, oy;
  logic signed [Z_W-1:0]  iz;
  logic [3:0]             itag, otag;

  cordic_rotate #(.STAGES(STAGES), .XY_W(XY_W), .Z_W(Z_W), .TAG_W(4)) dut (
    .i_clk(clk), .i_rst_n(rst_n), .i_x(ix), .i_y(iy), .i_z(iz), .i_tag(itag),
    .o_x(ox), .o_y(oy), .o_tag(otag)
  );

  int checks = 0, failures = 0;
  real ex [NVEC], ey [NVEC];
  logic [3:0] et [NVEC];
  real kgain;

  initial begin
    kgain = 1.0;
    for (int i = 0; i < STAGES; i++) kgain *= $sqrt(1.0 + 2.0 ** (-2 * i));
    ix = '0; iy = '0; iz = '0; itag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC + STAGES; n++) begin
      @(negedge clk);
      if (n >= STAGES) begin
        int m;
        real dx, dy;
        m  = n - STAGES;
        dx = real'(ox) - ex[m];
        dy = real'(oy) - ey[m];
        checks++;
        if (dx > 40.0 || dx < -40.0 || dy > 40.0 || dy < -40.0 || otag != et[m]) begin
          failures++;
          if (failures < 10)
            $display("FAIL vec %0d: got (%0d,%0d,%0d) exp (%f,%f,%0d)", m, ox, oy, otag, ex[m], ey[m], et[m]);
        end
      end
      if (n < NVEC) begin
        real zr, xr, yr;
        ix   = XY_W'($signed($urandom_range(0, 2**21)) - 2**20);
        iy   = XY_W'($signed($urandom_range(0, 2**21)) - 2**20);
        iz   = Z_W'($signed($urandom_range(0, 2**23)) - 2**22);
        itag = 4'($urandom);
        zr = real'(iz) * 2.0 * PI / (2.0 ** Z_W);
        xr = real'(ix); yr = real'(iy);
        ex[n] = kgain * (xr * $cos(zr) - yr * $sin(zr));
        ey[n] = kgain * (yr * $cos(zr) + xr * $sin(zr));
        et[n] = itag;
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
