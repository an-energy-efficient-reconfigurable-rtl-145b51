// tb_mem_agu: self-checking test of the memory address generator.
// Random bases and steps are loaded; over many slow cycles the addresses of
// every phase must be base + cycles*step + phase (modulo 2048).
module tb_mem_agu;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, adv = 0;
  logic [1:0] phase = 0;
  mem_cfg_t cfg;
  logic [10:0] dm_raddr, dm_waddr, cm_raddr;
  int checks = 0, failures = 0;

  mem_agu dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      int nslow;
      cfg = '{rd_base: 11'($urandom), rd_step: 4'($urandom), wr_base: 11'($urandom),
              wr_step: 4'($urandom), cm_base: 11'($urandom), cm_step: 4'($urandom)};
      @(negedge clk); load = 1; phase = 3; @(negedge clk); load = 0;
      nslow = $urandom_range(1, 300);
      for (int j = 0; j < nslow; j++) begin
        for (int p = 0; p < 4; p++) begin
          phase = 2'(p);
          adv = (p == 3);
          #1;
          checks++;
          if (dm_raddr !== 11'(cfg.rd_base + j*cfg.rd_step + p) ||
              dm_waddr !== 11'(cfg.wr_base + j*cfg.wr_step + p) ||
              cm_raddr !== 11'(cfg.cm_base + j*cfg.cm_step + p)) begin
            failures++;
            $display("FAIL f=%0d j=%0d p=%0d rd=%0d wr=%0d cm=%0d", f, j, p, dm_raddr, dm_waddr, cm_raddr);
          end
          @(negedge clk);
        end
      end
      adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
