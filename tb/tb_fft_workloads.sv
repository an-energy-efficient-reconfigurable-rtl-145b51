// tb_fft_workloads: the FFT workloads run on the complete processor at its
// default size.
//
// Part 1 is a 16-point radix-4 FFT in two stages, eight functions in all.
// Each radix-4 butterfly is written as a 4x4 matrix-vector product. DOF k
// accumulates output k over four slow cycles, one input per cycle, with the
// twiddle factor and the (-j)^(mk) rotation folded into one coefficient from
// the coefficient memory. With N = 16, n, k, l, m = 0..3 and W_N = exp(-j2pi/N):
//   stage 1, function n:  y[n][k] = sum_m x[n+4m] * W16^(nk) * W4^(mk)
//                         stored at Y + 4n + k
//   stage 2, function l:  X[k+4l] = sum_n y[n][k] * W4^(nl)
//                         stored at OUT + 4l + k
// So the output is in natural order and the input needs no reordering.
//   - Stage 1 reads x with a pointer step of 4, and DOF k picks data-memory
//     slot n.
//   - Stage 2 reads one y row per cycle, and DOF k picks slot k.
// Every function shifts the sum right by 12, so each stage divides by 4 and
// the result is X/16.
//
// Part 2 is one radix-2 stage of two independent 16-point streams, as for
// two antennas, run at once:
//   - DOF0 and DOF1 form A + W*B and A - W*B for stream 0;
//   - DOF2 and DOF3 do the same for stream 1;
//   - both streams use the same twiddle factor.
//
// Expected FFT values come from a floating-point DFT. The tolerance is
// 4 LSB, which covers the truncation of the fixed-point datapath. The
// radix-2 results come from an integer model of the DOF arithmetic and must
// match exactly.
//
// The workload comes from the original description of the processor. Its
// mapping onto the units and all sizes are this design's own.
module tb_fft_workloads;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, host_we = 0, start = 0;
  host_sel_e host_sel = HOST_DM;
  logic [10:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic busy, done, exc_seen, out_valid;
  logic [15:0] n_functions;
  logic [1:0] phase;
  cplx_t ext_in = '0, out_data;
  int checks = 0, failures = 0;

  baseband_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  localparam real PI = 3.14159265358979;

  function automatic cplx_t C(input int re, input int im);
    C.re = 16'(re); C.im = 16'(im);
  endfunction
  function automatic int s16(input longint v);
    if (v > 32767) return 32767; if (v < -32768) return -32768; return int'(v);
  endfunction
  function automatic op_sel_t SEL(input src_e s, input int slot);
    SEL.src = s; SEL.slot = 2'(slot);
  endfunction
  // exp(-j 2 pi e / n) in Q15
  function automatic cplx_t W(input int e, input int n);
    real a;
    a = -2.0 * PI * e / n;
    return C($rtoi($floor(32767.0 * $cos(a) + 0.5)), $rtoi($floor(32767.0 * $sin(a) + 0.5)));
  endfunction

  logic [31:0] img [$];
  task automatic add_function(input hard_cfg_t cfg, input logic [5:0] mask, input int cnt,
                              input logic [NSOFT-1:0] sbits [$]);
    int bitpos = 0;
    logic [31:0] w = '0;
    logic [CFG_WORDS*32-1:0] flat = '0;
    img.push_back({2'd1, 1'b0, mask, 7'd0, 16'(cnt)});
    img.push_back({13'd0, 8'd1, 11'd0});
    flat[HARD_BITS-1:0] = cfg;
    for (int i = 0; i < CFG_WORDS; i++) img.push_back(flat[i*32 +: 32]);
    for (int j = 0; j < cnt; j++)
      for (int g = 0; g < NSOFT; g++)
        if (mask[g]) begin
          w[bitpos] = sbits[j][g]; bitpos++;
          if (bitpos == 32) begin img.push_back(w); w = '0; bitpos = 0; end
        end
    if (bitpos != 0) img.push_back(w);
  endtask

  task automatic host_write(input host_sel_e s, input int a, input logic [31:0] d);
    host_we = 1; host_sel = s; host_addr = 11'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(input int a, output cplx_t d);
    host_addr = 11'(a);
    @(negedge clk);
    d = cplx_t'(host_rdata);
  endtask

  // ------------------------------------------------------------ data layout
  localparam int N = 16;
  localparam int XB = 0, YB = 64, OB = 128;        // data memory
  localparam int C1 = 0, C2 = 64;                  // coefficient memory
  localparam int NBF = 16, RB = 256, TB = 128, R2OUT = 512;
  cplx_t x [N], ra [2][NBF], rb [2][NBF], tw [NBF];
  int n_reconf = 0, n_acc = 0;

  initial begin
    hard_cfg_t cfg;
    logic [NSOFT-1:0] sb [$];
    cplx_t r;

    for (int i = 0; i < N; i++)
      x[i] = C($urandom_range(0, 16000) - 8000, $urandom_range(0, 16000) - 8000);
    for (int s = 0; s < 2; s++)
      for (int t = 0; t < NBF; t++) begin
        ra[s][t] = C($urandom_range(0, 30000) - 15000, $urandom_range(0, 30000) - 15000);
        rb[s][t] = C($urandom_range(0, 30000) - 15000, $urandom_range(0, 30000) - 15000);
      end
    for (int t = 0; t < NBF; t++) tw[t] = W(t, 2 * NBF);

    // Soft bits of a 4-term accumulation: the sample read in slow cycle 0
    // is loaded (acc = 0) in cycle 1, the next three are added in 2..4; the
    // final sum is written in cycle 5.
    sb = {};
    for (int j = 0; j < 6; j++) sb.push_back((j >= 2 && j <= 4) ? 5'b01111 : 5'b00000);

    // ---- radix-4 stage 1: one function per butterfly n
    for (int n = 0; n < 4; n++) begin
      cfg = '0;
      for (int k = 0; k < NDOF; k++) begin
        cfg.dof[k] = '{cop_x1: COP_X, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_X, shift: 5'd12, x2_shift: 4'd0};
        cfg.op_sel[4*k]   = SEL(SRC_DM, n);
        cfg.op_sel[4*k+1] = SEL(SRC_CM, k);
        cfg.op_sel[4*k+2] = SEL(SRC_EXT, 0);      // zero: the port is idle
        cfg.from_cfg.mem_sel[k] = 4'(3*k + 1);
      end
      cfg.from_cfg.mem_we = 4'b1111;
      cfg.mem = '{rd_base: 11'(XB), rd_step: 4'd4, wr_base: 11'(YB + 4*n), wr_step: 4'd0,
                  cm_base: 11'(C1 + 16*n), cm_step: 4'd4};
      add_function(cfg, 6'b001111, 6, sb);
    end
    // ---- radix-4 stage 2: one function per output group l
    for (int l = 0; l < 4; l++) begin
      cfg = '0;
      for (int k = 0; k < NDOF; k++) begin
        cfg.dof[k] = '{cop_x1: COP_X, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_X, shift: 5'd12, x2_shift: 4'd0};
        cfg.op_sel[4*k]   = SEL(SRC_DM, k);
        cfg.op_sel[4*k+1] = SEL(SRC_CM, 0);
        cfg.op_sel[4*k+2] = SEL(SRC_EXT, 0);
        cfg.from_cfg.mem_sel[k] = 4'(3*k + 1);
      end
      cfg.from_cfg.mem_we = 4'b1111;
      cfg.mem = '{rd_base: 11'(YB), rd_step: 4'd4, wr_base: 11'(OB + 4*l), wr_step: 4'd0,
                  cm_base: 11'(C2 + 4*l), cm_step: 4'd1};
      add_function(cfg, 6'b001111, 6, sb);
    end
    // ---- two radix-2 streams: A_s at RB+4t+2s, B_s at RB+4t+2s+1
    cfg = '0;
    for (int k = 0; k < NDOF; k++) begin
      cfg.dof[k] = '{cop_x1: COP_X, cop_x2: COP_X, cop_x3: COP_X,
                     cop_p: (k % 2) ? COP_NEG : COP_X, shift: 5'd10, x2_shift: 4'd10};
      cfg.op_sel[4*k]   = SEL(SRC_DM, 2*(k/2) + 1);
      cfg.op_sel[4*k+1] = SEL(SRC_CM, 0);
      cfg.op_sel[4*k+2] = SEL(SRC_DM, 2*(k/2));
      cfg.from_cfg.mem_sel[k] = 4'(3*k + 1);
    end
    cfg.from_cfg.mem_we = 4'b1111;
    cfg.mem = '{rd_base: 11'(RB), rd_step: 4'd4, wr_base: 11'(R2OUT - 8), wr_step: 4'd4,
                cm_base: 11'(TB), cm_step: 4'd1};
    sb = {};
    add_function(cfg, 6'b000000, NBF + 2, sb);
    img.push_back(32'h0);   // halt

    // ------------------------------------------------------------ load
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (img[i]) host_write(HOST_CFG, i, img[i]);
    host_write(HOST_ALU, 0, 32'h0);
    for (int i = 0; i < N + 8; i++) host_write(HOST_DM, XB + i, (i < N) ? x[i] : 32'h0);
    for (int n = 0; n < 4; n++)
      for (int m = 0; m < 4; m++)
        for (int k = 0; k < 4; k++)
          host_write(HOST_CM, C1 + 16*n + 4*m + k, W(n*k + 4*m*k, 16));
    for (int l = 0; l < 4; l++)
      for (int n = 0; n < 4; n++) host_write(HOST_CM, C2 + 4*l + n, W(n*l, 4));
    for (int s = 0; s < 2; s++)
      for (int t = 0; t < NBF; t++) begin
        host_write(HOST_DM, RB + 4*t + 2*s, ra[s][t]);
        host_write(HOST_DM, RB + 4*t + 2*s + 1, rb[s][t]);
      end
    for (int t = 0; t < NBF; t++) host_write(HOST_CM, TB + t, tw[t]);

    // ------------------------------------------------------------ run
    start = 1; @(negedge clk); start = 0;
    fork
      begin : monitor
        forever begin
          @(negedge clk);
          if (dut.agu_load) n_reconf++;
          if (dut.ce) for (int k = 0; k < NDOF; k++) if (dut.soft_bits[k]) n_acc++;
        end
      end
      begin
        wait (done);
      end
    join_any
    disable monitor;
    @(negedge clk);

    // ------------------------------------------------------------ check radix-4 FFT
    for (int kk = 0; kk < N; kk++) begin
      real er, ei;
      er = 0.0; ei = 0.0;
      for (int i = 0; i < N; i++) begin
        real a;
        a = -2.0 * PI * i * kk / N;
        er += x[i].re * $cos(a) - x[i].im * $sin(a);
        ei += x[i].re * $sin(a) + x[i].im * $cos(a);
      end
      er = er / 16.0; ei = ei / 16.0;
      host_read(OB + kk, r);
      checks++;
      if (real'(r.re) - er > 4.0 || er - real'(r.re) > 4.0 ||
          real'(r.im) - ei > 4.0 || ei - real'(r.im) > 4.0) begin
        failures++;
        $display("FAIL radix-4 X[%0d] got %0d,%0d exp %f,%f", kk, r.re, r.im, er, ei);
      end
    end
    // ------------------------------------------------------------ check two radix-2 streams
    for (int s = 0; s < 2; s++)
      for (int t = 0; t < NBF; t++) begin
        int pr, pi_, e0r, e0i, e1r, e1i;
        cplx_t r1;
        pr  = rb[s][t].re * tw[t].re - rb[s][t].im * tw[t].im;
        pi_ = rb[s][t].re * tw[t].im + rb[s][t].im * tw[t].re;
        e0r = s16(((ra[s][t].re <<< 10) + (pr >>> 5)) >>> 10);
        e0i = s16(((ra[s][t].im <<< 10) + (pi_ >>> 5)) >>> 10);
        e1r = s16(((ra[s][t].re <<< 10) + ((-pr) >>> 5)) >>> 10);
        e1i = s16(((ra[s][t].im <<< 10) + ((-pi_) >>> 5)) >>> 10);
        host_read(R2OUT + 4*t + 2*s, r);
        host_read(R2OUT + 4*t + 2*s + 1, r1);
        checks++;
        if (r.re !== 16'(e0r) || r.im !== 16'(e0i) || r1.re !== 16'(e1r) || r1.im !== 16'(e1i)) begin
          failures++;
          $display("FAIL radix-2 stream %0d butterfly %0d got %0d,%0d / %0d,%0d exp %0d,%0d / %0d,%0d",
                   s, t, r.re, r.im, r1.re, r1.im, e0r, e0i, e1r, e1i);
        end
      end

    // ------------------------------------------------------------ mechanisms
    $display("functions=%0d reconfigurations=%0d accumulate=%0d", n_functions, n_reconf, n_acc);
    checks++;
    if (n_reconf != 9 || n_functions != 16'd9 || n_acc != 8 * 3 * NDOF) begin
      failures++; $display("FAIL expected 9 functions and %0d accumulations", 8 * 3 * NDOF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
