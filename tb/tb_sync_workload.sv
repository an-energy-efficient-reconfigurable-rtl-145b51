// tb_sync_workload: packet synchronisation on the complete processor at its
// default size, with a cross-correlation chained through three DOF units.
//
// The received stream x holds small noise and, at sample POS, a 3-sample
// preamble p = (A, jA, -A). The real part of its cross-correlation
// corr(n) = sum_k x[n+k] * conj(p[k]) is 3A^2 at the preamble and at most
// about 0.2 A^2 elsewhere. The running maximum of that real part is compared
// with a threshold; the ALU raises the exception, and the function stops.
//
// Function 1 loads the threshold into ALU register r1 and clears the DOF
// units and the ML unit with zeros.
//
// Function 2 is the detector. The correlation is a chain of three DOF units
// that pass partial sums over the feedback bus. DOF k multiplies by
// conj(p[k]) and adds, on its x3 input, the partial sum of DOF k-1. A fed-back
// value is used two slow cycles after the unit that produced it. So DOF k
// reads data-memory slot 2-k, one sample earlier in the stream for each step
// down the chain, and the three products of one corr(n) meet in DOF 2.
// Counting slow cycles from the start of the function:
//   - corr(n) is computed in cycle n+3 and written in cycle n+4;
//   - the ML unit takes it in cycle n+5;
//   - corr(0) and corr(1) are not complete, because DOF0 had not yet been
//     given samples 0 and 1 when they passed down the chain. They are not
//     checked, and the ML search restarts with corr(2), in cycle 7;
//   - the ALU compares the maximum in cycle n+7, and if it is above r1 the
//     function ends after that cycle.
// The feedback bus carries, per slow cycle:
//   slot 0  DOF0 -> DOF1,  slot 1  DOF1 -> DOF2,
//   slot 2  DOF2 -> ML,    slot 3  ML -> ALU.
// The expected values come from an integer model of the chained DOF
// arithmetic. The testbench checks:
//   - every written correlation and running maximum;
//   - the cycle in which the exception stops the function;
//   - that nothing is written after that cycle.
//
// The workload comes from the original description of the processor. Its
// mapping onto the units and all sizes are this design's own.
module tb_sync_workload;
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
  function automatic cplx_t C(input int re, input int im);
    C.re = 16'(re); C.im = 16'(im);
  endfunction
  function automatic int s16(input longint v);
    if (v > 32767) return 32767; if (v < -32768) return -32768; return int'(v);
  endfunction
  function automatic op_sel_t SEL(input src_e s, input int slot);
    SEL.src = s; SEL.slot = 2'(slot);
  endfunction
  function automatic alu_instr_t I(input alu_op_e op, input int rd, input int rs1, input int rs2);
    I.op = op; I.rd = 3'(rd); I.rs1 = 3'(rs1); I.rs2 = 3'(rs2);
  endfunction

  logic [31:0] img [$];
  task automatic add_function(input hard_cfg_t cfg, input logic [5:0] mask, input int cnt,
                              input bit stop, input int abase,
                              input logic [NSOFT-1:0] sbits [$]);
    int bitpos = 0;
    logic [31:0] w = '0;
    logic [CFG_WORDS*32-1:0] flat = '0;
    img.push_back({2'd1, stop, mask, 7'd0, 16'(cnt)});
    img.push_back({13'd0, 8'd1, 11'(abase)});
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

  // ------------------------------------------------------------ stimulus
  localparam int NS = 100, POS = 57, A = 8000, THR = 4000, SHIFT = 10;
  localparam int XB = 100, OUT = 1000, ZB = 300, TH = 50;
  cplx_t x [NS + 4], p [3];
  int n_exc = 0, n_fb = 0, n_ml_hit = 0, exc_cycle = -1, slow = 0, in_f2 = 0;

  // one DOF term: ((re/im of x * conj(c)) >>> 5) >>> SHIFT
  function automatic int term_re(input cplx_t a, input cplx_t c);
    return ((int'(a.re) * c.re + int'(a.im) * c.im) >>> 5) >>> SHIFT;
  endfunction
  function automatic int term_im(input cplx_t a, input cplx_t c);
    return ((int'(a.im) * c.re - int'(a.re) * c.im) >>> 5) >>> SHIFT;
  endfunction

  initial begin
    hard_cfg_t cfg;
    logic [NSOFT-1:0] sb [$];
    cplx_t r, m;
    int corr_re [NS], corr_im [NS], nstar;
    corr_re = '{default: 0}; corr_im = '{default: 0};

    p[0] = C(A, 0); p[1] = C(0, A); p[2] = C(-A, 0);
    for (int i = 0; i < NS + 4; i++)
      x[i] = C($urandom_range(0, 600) - 300, $urandom_range(0, 600) - 300);
    for (int k = 0; k < 3; k++) x[POS + k] = C(x[POS + k].re + p[k].re, x[POS + k].im + p[k].im);

    // model of the chain: each DOF saturates its own partial sum
    nstar = -1;
    for (int n = 2; n < NS; n++) begin
      int sr, si;
      sr = 0; si = 0;
      for (int k = 0; k < 3; k++) begin
        sr = s16(sr + term_re(x[n + k], p[k]));
        si = s16(si + term_im(x[n + k], p[k]));
      end
      corr_re[n] = sr; corr_im[n] = si;
      if (nstar < 0 && sr > THR) nstar = n;
    end

    // ---- function 1: r1 <= threshold, DOF units and ML cleared
    cfg = '0;
    cfg.op_sel[OP_ALU] = SEL(SRC_CM, 0);
    cfg.mem = '{rd_base: 11'(ZB), rd_step: 4'd0, wr_base: 11'd0, wr_step: 4'd0, cm_base: 11'(TH), cm_step: 4'd0};
    sb = {};
    for (int j = 0; j < 3; j++) sb.push_back(5'b10000);
    add_function(cfg, 6'b110000, 3, 1'b0, 0, sb);

    // ---- function 2: chained correlation -> ML -> ALU, stop on exception
    cfg = '0;
    for (int k = 0; k < 3; k++) begin
      cfg.dof[k] = '{cop_x1: COP_JC, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_NJ,
                     shift: 5'(SHIFT), x2_shift: 4'd0};
      cfg.op_sel[4*k]   = SEL(SRC_DM, 2 - k);
      cfg.op_sel[4*k+1] = SEL(SRC_CM, k);
      cfg.op_sel[4*k+2] = SEL(SRC_EXT, 0);                        // zero
      cfg.op_sel[4*k+3] = (k == 0) ? SEL(SRC_EXT, 0) : SEL(SRC_FB, k - 1);
      cfg.from_cfg.fb_sel[k] = 4'(3*k);                           // z1 of DOF k
    end
    cfg.cordic_vec = 1'b0;
    cfg.ml_min = 1'b0;
    cfg.op_sel[OP_ML]  = SEL(SRC_FB, 2);
    cfg.op_sel[OP_ALU] = SEL(SRC_FB, 3);
    cfg.from_cfg.fb_sel[3]  = 4'(RES_ML);
    cfg.from_cfg.mem_sel[0] = 4'd6;                               // DOF2 z1
    cfg.from_cfg.mem_sel[1] = 4'(RES_ML);
    cfg.from_cfg.mem_we = 4'b0011;
    cfg.mem = '{rd_base: 11'(XB), rd_step: 4'd1, wr_base: 11'(OUT - 16), wr_step: 4'd4,
                cm_base: 11'd0, cm_step: 4'd0};
    sb = {};
    for (int j = 0; j < NS + 8; j++) sb.push_back((j == 7) ? 5'b10000 : 5'b00000);
    add_function(cfg, 6'b110000, NS + 8, 1'b1, 1, sb);
    img.push_back(32'h0);   // halt

    // ------------------------------------------------------------ load
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (img[i]) host_write(HOST_CFG, i, img[i]);
    host_write(HOST_ALU, 0, {14'(I(OP_NOP, 0, 0, 0)), 14'(I(OP_ADD, 1, 7, 0))});
    host_write(HOST_ALU, 1, {14'(I(OP_NOP, 0, 0, 0)), 14'(I(OP_GT, 7, 7, 1))});
    for (int i = 0; i < NS + 4; i++) host_write(HOST_DM, XB + i, x[i]);
    for (int k = 0; k < 3; k++) host_write(HOST_CM, k, p[k]);
    host_write(HOST_CM, TH, C(THR, 0));
    for (int i = 0; i < 4; i++) host_write(HOST_DM, ZB + i, 32'h0);
    for (int i = 0; i < 4 * (NS + 8); i++) host_write(HOST_DM, OUT - 16 + i, 32'hdead_beef);

    // ------------------------------------------------------------ run
    start = 1; @(negedge clk); start = 0;
    fork
      begin : monitor
        forever begin
          @(negedge clk);
          if (dut.agu_load) begin in_f2++; slow = 0; end
          else if (dut.ce) slow++;
          if (in_f2 == 2 && dut.ce && dut.ml_hit) n_ml_hit++;
          if (in_f2 == 2 && dut.ce)
            for (int i = 0; i < NOPS; i++) if (dut.hard.op_sel[i].src == SRC_FB) n_fb++;
          if (dut.exc) begin
            n_exc++;
            if (exc_cycle < 0 && in_f2 == 2) exc_cycle = slow;
          end
        end
      end
      begin
        wait (done);
      end
    join_any
    disable monitor;
    @(negedge clk);

    // ------------------------------------------------------------ check
    $display("preamble at %0d, detected at correlation index %0d, exception in slow cycle %0d",
             POS, nstar, exc_cycle);
    checks++;
    if (nstar != POS) begin
      failures++; $display("FAIL model: the preamble is not the first correlation above the threshold");
    end
    checks++;
    if (exc_cycle != nstar + 7) begin
      failures++; $display("FAIL exception in cycle %0d, expected %0d", exc_cycle, nstar + 7);
    end
    begin
      int best;
      best = 0;
      for (int n = 2; n < NS; n++) begin
        host_read(OUT + 4*n, r);
        checks++;
        if (n + 4 <= nstar + 7) begin
          if (r.re !== 16'(corr_re[n]) || r.im !== 16'(corr_im[n])) begin
            failures++;
            $display("FAIL corr(%0d) got %0d,%0d exp %0d,%0d", n, r.re, r.im, corr_re[n], corr_im[n]);
          end
        end else if (r !== cplx_t'(32'hdead_beef)) begin
          failures++; $display("FAIL corr(%0d) written after the exception", n);
        end
        if (n == 2 || corr_re[n] > best) best = corr_re[n];
        host_read(OUT + 4*(n + 2) + 1, m);
        checks++;
        if (n + 6 <= nstar + 7) begin
          if (m.re !== 16'(best)) begin
            failures++; $display("FAIL max after corr(%0d) got %0d exp %0d", n, m.re, best);
          end
        end else if (m !== cplx_t'(32'hdead_beef)) begin
          failures++; $display("FAIL max after corr(%0d) written after the exception", n);
        end
      end
    end

    // ------------------------------------------------------------ mechanisms
    $display("feedback operands=%0d ml_new_max=%0d exceptions=%0d functions=%0d",
             n_fb, n_ml_hit, n_exc, n_functions);
    checks++;
    if (n_fb == 0 || n_ml_hit == 0 || n_exc == 0 || !exc_seen || n_functions != 16'd2) begin
      failures++; $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
