// tb_cordic_unit: self-checking test of the CORDIC unit.
//
// Rotation mode: random angles over the full circle and random amplitudes;
// the outputs must equal K*A*cos(theta), K*A*sin(theta) (Q2.14) within
// 0.008 (Q2.14 full scale is 2.0), K being the product of sqrt(1 + 2^-2i) over the ten
// stages. Vectoring mode: random vectors of magnitude up to 1; the outputs
// must equal K*|v| and atan2(y, x), the angle within 0.006 + 0.004/|v| rad
// (the 12-bit stages resolve small vectors coarsely). The reference uses real arithmetic.
// The result must appear after exactly one enabled clock.
module tb_cordic_unit;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, vec = 0;
  cplx_t in_xy, out_xy;
  logic signed [15:0] in_z, out_z;
  int checks = 0, failures = 0;
  real K, maxe_xy = 0, maxe_z = 0;
  localparam real PI = 3.14159265358979;

  cordic_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real ex, input real ey, input real ez, input bit chk_z);
    real gx, gy, gz, dz;
    gx = real'(out_xy.re) / 16384.0;
    gy = real'(out_xy.im) / 16384.0;
    gz = real'(out_z) * PI / 32768.0;
    dz = gz - ez;
    if (dz > PI) dz -= 2*PI;
    if (dz < -PI) dz += 2*PI;
    if (dz < 0) dz = -dz;
    checks++;
    if ((gx-ex > 0.008) || (ex-gx > 0.008) || (gy-ey > 0.008) || (ey-gy > 0.008) ||
        (chk_z && dz > 0.006 + 0.004 / (ex / K))) begin
      failures++;
      $display("FAIL vec=%0d got %f %f %f exp %f %f %f", vec, gx, gy, gz, ex, ey, ez);
    end
    if ((gx-ex) > maxe_xy) maxe_xy = gx-ex;
    if ((ex-gx) > maxe_xy) maxe_xy = ex-gx;
    if (chk_z && dz > maxe_z) maxe_z = dz;
  endtask

  initial begin
    K = 1.0;
    for (int i = 0; i < 10; i++) K = K * $sqrt(1.0 + 2.0 ** (-2*i));
    in_xy = '0; in_z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      real a, th, x, y;
      vec = (n >= 2000);
      if (!vec) begin
        a  = 0.05 + 0.9 * real'($urandom_range(0, 1000)) / 1000.0 / K * 1.6;
        th = (real'($urandom_range(0, 65535)) - 32768.0) * PI / 32768.0;
        in_xy = '{re: 16'($rtoi(a * 32768.0)), im: '0};
        in_z  = 16'($rtoi(th * 32768.0 / PI));
        th = real'(in_z) * PI / 32768.0;
        x = real'(in_xy.re) / 32768.0;
        ce = 1; @(negedge clk); ce = 0;
        check(K * x * $cos(th), K * x * $sin(th), 0.0, 1'b0);
      end else begin
        x = (real'($urandom_range(0, 2000)) - 1000.0) / 1420.0;
        y = (real'($urandom_range(0, 2000)) - 1000.0) / 1420.0;
        in_xy = '{re: 16'($rtoi(x * 32768.0)), im: 16'($rtoi(y * 32768.0))};
        in_z  = 16'($urandom);
        x = real'(in_xy.re) / 32768.0;
        y = real'(in_xy.im) / 32768.0;
        ce = 1; @(negedge clk); ce = 0;
        if (x*x + y*y > 1e-4) check(K * $sqrt(x*x + y*y), 0.0, $atan2(y, x), 1'b1);
      end
      // hold: outputs must not move without ce
      begin
        cplx_t h;
        h = out_xy;
        in_xy = '{re: 16'sd1000, im: 16'sd1000};
        @(negedge clk);
        checks++;
        if (out_xy !== h) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("max error: xy %f, angle %f rad", maxe_xy, maxe_z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
