// tb_control_unit: self-checking test of the control unit.
//
// A four-function program is assembled in the testbench (header words, hard
// configuration, packed soft stream, then a halt) and written through the
// host port together with an ALU program. While it runs, every slow-cycle
// enable is compared with the expected function: the hard configuration
// must be that function's, the soft bits those of its next slow cycle, and
// the number of enables must equal its cycle count. ALU instructions must
// cycle through the function's ALU program, one per fast cycle. The third
// function stops on an exception that the testbench raises; done must rise
// at the halt.
module tb_control_unit;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, host_we_cfg = 0, host_we_alu = 0, exc = 0;
  logic [10:0] host_addr = 0;
  logic [31:0] host_wdata = 0;
  logic [1:0] phase;
  logic ce, running, agu_load, alu_run, busy, done, exc_seen;
  hard_cfg_t hard;
  logic [NSOFT-1:0] soft_bits;
  alu_instr_t [1:0] alu_instr;
  logic [15:0] n_functions;
  int checks = 0, failures = 0;

  control_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  logic [31:0] img [$];
  hard_cfg_t   f_cfg [4];
  logic [5:0]  f_mask [4];
  int          f_cnt [4], f_abase [4], f_alen [4];
  logic [NSOFT-1:0] f_soft [4][$];
  logic [31:0] alu_img [64];

  task automatic add_function(input int f, input bit stop);
    int bitpos = 0;
    logic [31:0] w = '0;
    logic [CFG_WORDS*32-1:0] flat;
    img.push_back({2'd1, stop, f_mask[f], 7'd0, 16'(f_cnt[f])});
    img.push_back({13'd0, 8'(f_alen[f]), 11'(f_abase[f])});
    flat = '0;
    flat[HARD_BITS-1:0] = f_cfg[f];
    for (int i = 0; i < CFG_WORDS; i++) img.push_back(flat[i*32 +: 32]);
    for (int j = 0; j < f_cnt[f]; j++)
      for (int g = 0; g < NSOFT; g++)
        if (f_mask[f][g]) begin
          w[bitpos] = f_soft[f][j][g];
          bitpos++;
          if (bitpos == 32) begin img.push_back(w); w = '0; bitpos = 0; end
        end
    if (bitpos != 0) img.push_back(w);
  endtask

  initial begin
    int f, k, nce, alu_k;
    int ce_per_f [4];
    for (int i = 0; i < 64; i++) alu_img[i] = $urandom & 32'h0fff_ffff;
    f_mask[0] = 6'b110101; f_cnt[0] = 40;  f_abase[0] = 5;  f_alen[0] = 3;
    f_mask[1] = 6'b000000; f_cnt[1] = 3;   f_abase[1] = 0;  f_alen[1] = 1;
    f_mask[2] = 6'b111111; f_cnt[2] = 500; f_abase[2] = 20; f_alen[2] = 8;
    f_mask[3] = 6'b001000; f_cnt[3] = 7;   f_abase[3] = 0;  f_alen[3] = 4;
    for (int i = 0; i < 4; i++) begin
      logic [HARD_BITS+63:0] r;
      r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      f_cfg[i] = hard_cfg_t'(r[HARD_BITS-1:0]);
      for (int j = 0; j < f_cnt[i]; j++) f_soft[i].push_back(NSOFT'($urandom) & f_mask[i][NSOFT-1:0]);
      add_function(i, i == 2);
    end
    img.push_back(32'h0);   // halt

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (img[i]) begin
      host_we_cfg = 1; host_addr = 11'(i); host_wdata = img[i]; @(negedge clk);
    end
    host_we_cfg = 0;
    for (int i = 0; i < 64; i++) begin
      host_we_alu = 1; host_addr = 11'(i); host_wdata = alu_img[i]; @(negedge clk);
    end
    host_we_alu = 0;
    start = 1; @(negedge clk); start = 0;

    f = -1; k = 0; nce = 0; alu_k = 0;
    for (int i = 0; i < 4; i++) ce_per_f[i] = 0;
    while (!done) begin
      @(posedge clk);
      if (agu_load) begin
        f++; k = 0; alu_k = 0;
        checks++;
        if (phase != 2'd3 || running) begin failures++; $display("FAIL start timing"); end
      end
      if (running && f >= 0) begin
        // ALU instruction stream
        if (f_mask[f][GRP_ALU]) begin
          logic [31:0] e;
          e = alu_img[f_abase[f] + (alu_k % f_alen[f])];
          checks++;
          if (alu_instr !== e[27:0] || !alu_run) begin
            failures++; $display("FAIL alu f=%0d k=%0d got %h exp %h", f, alu_k, alu_instr, e[27:0]);
          end
        end else begin
          checks++;
          if (alu_run || alu_instr != '0) begin failures++; $display("FAIL alu idle"); end
        end
        alu_k++;
      end
      if (ce) begin
        checks++;
        if (hard !== f_cfg[f] || soft_bits !== f_soft[f][k]) begin
          failures++;
          $display("FAIL f=%0d cycle %0d soft=%b exp %b hard_ok=%0d", f, k, soft_bits, f_soft[f][k], hard === f_cfg[f]);
        end
        k++; ce_per_f[f]++;
        if (f == 2 && k == 100) exc <= 1;
      end
      if (exc && running && k > 100) exc <= 0;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (ce_per_f[i] != ((i == 2) ? 101 : f_cnt[i])) begin
        failures++; $display("FAIL function %0d ran %0d slow cycles", i, ce_per_f[i]);
      end
    end
    checks++;
    if (!exc_seen || n_functions != 16'd4 || busy) begin
      failures++; $display("FAIL status exc_seen=%0d n=%0d", exc_seen, n_functions);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
