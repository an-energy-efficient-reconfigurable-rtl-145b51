// tb_icn_from_dp: self-checking test of the interconnect from the datapath.
// With random results and random configurations, in each phase p the
// memory-write bus must carry the result selected for slot p (enable only
// while run is high), and the feedback bus must carry the result selected
// for slot p one clock later.
module tb_icn_from_dp;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [1:0] phase = 0;
  from_cfg_t cfg;
  cplx_t [NRES-1:0] res;
  logic mem_we;
  cplx_t mem_wdata, fb_bus;
  int checks = 0, failures = 0;

  icn_from_dp dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t exp_fb;
    cfg = '0; res = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 8000; n++) begin
      if (n % 64 == 0) cfg = from_cfg_t'({$urandom, $urandom});
      if (n % 4 == 0) for (int i = 0; i < NRES; i++) res[i] = cplx_t'($urandom);
      phase = 2'(n);
      run = ($urandom_range(0, 5) != 0);
      #1;
      checks++;
      if (mem_wdata !== res[cfg.mem_sel[phase]] || mem_we !== (run && cfg.mem_we[phase])) begin
        failures++; $display("FAIL mem n=%0d", n);
      end
      exp_fb = res[cfg.fb_sel[phase]];
      @(negedge clk);
      checks++;
      if (fb_bus !== exp_fb) begin
        failures++; $display("FAIL fb n=%0d got %h exp %h", n, fb_bus, exp_fb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
