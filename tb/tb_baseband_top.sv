// tb_baseband_top: end-to-end test of the baseband processor at its full
// default size.
//
// The testbench assembles a program of five functions, loads it with the
// data and coefficients through the host port, runs it and reads the
// results back from the data memory:
//   F1  correlation: the four DOF units compute x[n+k] * conj(c[n]) summed
//       over 32 samples for the lags k = 0..3 (FIR/correlation mapping,
//       accumulate soft bit, sliding-window addressing);
//   F2  one radix-2 FFT stage: DOF0 forms A + W*B and DOF1 A - W*B for 16
//       butterflies (load mode, streaming addresses);
//   F3  CORDIC vectoring of 20 samples that arrive on the external port;
//   F4  the ALU copies a threshold from the coefficient memory into r1;
//   F5  packet detection: DOF0 computes |x|^2, the result is fed back to
//       the ML accelerator (running maximum), whose output is fed back to
//       the ALU, which raises an exception when the maximum exceeds r1; the
//       exception ends the function early.
// Expected values come from integer/real models written here. The test
// counts how often each mechanism happened (reconfiguration, accumulation,
// feedback, external input, CORDIC, ML new maximum, exception with early
// stop) and fails for any that never did.
module tb_baseband_top;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, host_we = 0, start = 0;
  host_sel_e host_sel = HOST_DM;
  logic [10:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic busy, done, exc_seen, out_valid;
  logic [15:0] n_functions;
  logic [1:0] phase;
  cplx_t ext_in, out_data;
  int checks = 0, failures = 0;

  baseband_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  logic [31:0] img [$];
  task automatic add_function(input hard_cfg_t cfg, input logic [5:0] mask, input int cnt,
                              input bit stop, input int abase, input int alen,
                              input logic [NSOFT-1:0] sbits [$]);
    int bitpos = 0;
    logic [31:0] w = '0;
    logic [CFG_WORDS*32-1:0] flat = '0;
    img.push_back({2'd1, stop, mask, 7'd0, 16'(cnt)});
    img.push_back({13'd0, 8'(alen), 11'(abase)});
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

  function automatic alu_instr_t I(input alu_op_e op, input int rd, input int rs1, input int rs2);
    I.op = op; I.rd = 3'(rd); I.rs1 = 3'(rs1); I.rs2 = 3'(rs2);
  endfunction

  // ------------------------------------------------------------ stimulus
  localparam int L = 32, NBF = 16, NCOR = 20, NSYNC = 120, PKT = 70, THR = 12000;
  cplx_t d [L+4], c [L], fa [NBF], fb [NBF], tw [NBF], sx [NSYNC];
  int ext_s0 = -1, slow_abs = 0;
  int n_acc = 0, n_fb = 0, n_ext = 0, n_cordic = 0, n_ml_hit = 0, n_exc = 0, n_reconf = 0;

  // External port: the word for slot p of absolute slow cycle s. Slot 3
  // always carries zero, used to load the accumulators with 0.
  function automatic cplx_t ext_word(input int s, input int p);
    return (p == 0) ? C(((s * 37) % 1800 - 900) * 20, ((s * 53) % 1800 - 900) * 20) :
           (p == 3) ? C(0, 0) : C(p, -p);
  endfunction

  always @(posedge clk) if (phase == 2'd3) slow_abs <= slow_abs + 1;
  always @(negedge clk) ext_in <= ext_word(slow_abs, int'(phase));

  initial begin
    hard_cfg_t cfg;
    logic [NSOFT-1:0] sb [$];
    cplx_t r;
    real K = 1.0;
    int n_f5;
    for (int i = 0; i < 10; i++) K = K * $sqrt(1.0 + 2.0 ** (-2*i));

    for (int i = 0; i < L+4; i++) d[i] = C($urandom_range(0, 4000) - 2000, $urandom_range(0, 4000) - 2000);
    for (int i = 0; i < L; i++)   c[i] = C($urandom_range(0, 4000) - 2000, $urandom_range(0, 4000) - 2000);
    for (int i = 0; i < NBF; i++) begin
      real ang = -2.0 * 3.14159265 * i / (2 * NBF);
      fa[i] = C($urandom_range(0, 30000) - 15000, $urandom_range(0, 30000) - 15000);
      fb[i] = C($urandom_range(0, 30000) - 15000, $urandom_range(0, 30000) - 15000);
      tw[i] = C($rtoi(32767.0 * $cos(ang)), $rtoi(32767.0 * $sin(ang)));
    end
    for (int i = 0; i < NSYNC; i++)
      sx[i] = (i >= PKT) ? C(2000 + i, -1800) : C($urandom_range(0, 600) - 300, $urandom_range(0, 600) - 300);

    // ---- F1: correlation at four lags
    cfg = '0;
    for (int k = 0; k < NDOF; k++) begin
      cfg.dof[k] = '{cop_x1: COP_JC, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_NJ, shift: 5'd10, x2_shift: 4'd0};
      cfg.op_sel[4*k]   = SEL(SRC_DM, k);
      cfg.op_sel[4*k+1] = SEL(SRC_CM, 0);
      cfg.op_sel[4*k+2] = SEL(SRC_EXT, 3);
      cfg.from_cfg.mem_sel[k] = 4'(3*k + 1);
    end
    cfg.from_cfg.mem_we = 4'b1111;
    cfg.mem = '{rd_base: 11'd0, rd_step: 4'd1, wr_base: 11'd512, wr_step: 4'd0, cm_base: 11'd0, cm_step: 4'd1};
    sb = {};
    for (int j = 0; j < L+2; j++) sb.push_back((j >= 2) ? 5'b01111 : 5'b00000);
    add_function(cfg, 6'b001111, L+2, 1'b0, 0, 1, sb);

    // ---- F2: radix-2 butterflies, A at 100+2t, B at 101+2t, W at CM 100+t
    cfg = '0;
    cfg.dof[0] = '{cop_x1: COP_X, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_X,   shift: 5'd10, x2_shift: 4'd10};
    cfg.dof[1] = '{cop_x1: COP_X, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_NEG, shift: 5'd10, x2_shift: 4'd10};
    for (int k = 0; k < 2; k++) begin
      cfg.op_sel[4*k]   = SEL(SRC_DM, 1);
      cfg.op_sel[4*k+1] = SEL(SRC_CM, 0);
      cfg.op_sel[4*k+2] = SEL(SRC_DM, 0);
      cfg.from_cfg.mem_sel[k] = 4'(3*k + 1);
    end
    cfg.from_cfg.mem_we = 4'b0011;
    cfg.mem = '{rd_base: 11'd100, rd_step: 4'd2, wr_base: 11'd596, wr_step: 4'd2, cm_base: 11'd100, cm_step: 4'd1};
    sb = {};
    add_function(cfg, 6'b000000, NBF+2, 1'b0, 0, 1, sb);

    // ---- F3: CORDIC vectoring of external samples
    cfg = '0;
    cfg.cordic_vec = 1'b1;
    cfg.op_sel[OP_CORDIC_XY] = SEL(SRC_EXT, 0);
    cfg.from_cfg.mem_sel[0] = 4'(RES_CORDIC_XY);
    cfg.from_cfg.mem_sel[1] = 4'(RES_CORDIC_Z);
    cfg.from_cfg.mem_we = 4'b0011;
    cfg.mem = '{rd_base: 11'd0, rd_step: 4'd0, wr_base: 11'd692, wr_step: 4'd4, cm_base: 11'd0, cm_step: 4'd0};
    add_function(cfg, 6'b000000, NCOR+2, 1'b0, 0, 1, sb);

    // ---- F4: r1 <= threshold (CM 200); DOF0 and the ML are cleared
    // with zeros from DM 300..303 so that F5 starts from a clean pipeline
    cfg = '0;
    cfg.op_sel[OP_ALU] = SEL(SRC_CM, 0);
    cfg.mem = '{rd_base: 11'd300, rd_step: 4'd0, wr_base: 11'd0, wr_step: 4'd0, cm_base: 11'd200, cm_step: 4'd0};
    sb = {};
    for (int j = 0; j < 3; j++) sb.push_back(5'b10000);
    add_function(cfg, 6'b110000, 3, 1'b0, 0, 1, sb);

    // ---- F5: packet detection, stops on the ALU exception
    cfg = '0;
    cfg.dof[0] = '{cop_x1: COP_JC, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_NJ, shift: 5'd4, x2_shift: 4'd0};
    cfg.op_sel[0] = SEL(SRC_DM, 0);
    cfg.op_sel[1] = SEL(SRC_DM, 0);
    cfg.op_sel[2] = SEL(SRC_EXT, 3);
    cfg.op_sel[OP_ML]  = SEL(SRC_FB, 0);
    cfg.op_sel[OP_ALU] = SEL(SRC_FB, 1);
    cfg.from_cfg.fb_sel[0]  = 4'd1;            // DOF0 z2
    cfg.from_cfg.fb_sel[1]  = 4'(RES_ML);
    cfg.from_cfg.mem_sel[0] = 4'd1;
    cfg.from_cfg.mem_sel[1] = 4'(RES_ML);
    cfg.from_cfg.mem_we = 4'b0011;
    cfg.mem = '{rd_base: 11'd200, rd_step: 4'd1, wr_base: 11'd792, wr_step: 4'd4, cm_base: 11'd0, cm_step: 4'd0};
    sb = {};
    for (int j = 0; j < NSYNC; j++) sb.push_back((j == 3) ? 5'b10000 : 5'b00000);
    add_function(cfg, 6'b110000, NSYNC, 1'b1, 1, 1, sb);
    img.push_back(32'h0);   // halt

    // ------------------------------------------------------------ load
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (img[i]) host_write(HOST_CFG, i, img[i]);
    host_write(HOST_ALU, 0, {14'(I(OP_NOP, 0, 0, 0)), 14'(I(OP_ADD, 1, 7, 0))});
    host_write(HOST_ALU, 1, {14'(I(OP_NOP, 0, 0, 0)), 14'(I(OP_GT, 7, 7, 1))});
    for (int i = 0; i < L+4; i++) host_write(HOST_DM, i, d[i]);
    for (int i = 0; i < L; i++)   host_write(HOST_CM, i, c[i]);
    for (int i = 0; i < NBF; i++) begin
      host_write(HOST_DM, 100 + 2*i, fa[i]);
      host_write(HOST_DM, 101 + 2*i, fb[i]);
      host_write(HOST_CM, 100 + i, tw[i]);
    end
    host_write(HOST_CM, 200, C(THR, 0));
    for (int i = 0; i < NSYNC; i++) host_write(HOST_DM, 200 + i, sx[i]);
    for (int i = 0; i < 4*NSYNC; i++) host_write(HOST_DM, 800 + i, 32'hdead_beef);
    for (int i = 300; i < 304; i++) host_write(HOST_DM, i, 32'h0);

    // ------------------------------------------------------------ run
    start = 1; @(negedge clk); start = 0;
    fork
      begin : monitor
        forever begin
          @(negedge clk);
          if (dut.agu_load) begin
            n_reconf++;
            if (n_reconf == 3) ext_s0 = slow_abs + 1;
          end
          if (dut.ce) begin
            for (int k = 0; k < NDOF; k++) if (dut.soft_bits[k]) n_acc++;
            for (int i = 0; i < NOPS; i++)
              if (dut.hard.op_sel[i].src == SRC_FB && (i == OP_ML || i == OP_ALU)) n_fb++;
            if (dut.hard.op_sel[OP_CORDIC_XY].src == SRC_EXT) n_ext++;
          end
          if (dut.exc) n_exc++;
        end
      end
      begin
        wait (done);
      end
    join_any
    disable monitor;
    @(negedge clk);

    // ------------------------------------------------------------ check F1
    for (int k = 0; k < NDOF; k++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int t = 0; t < L; t++) begin
        int a, b, cr, ci;
        a = d[t+k].re; b = d[t+k].im; cr = c[t].re; ci = c[t].im;
        sr += (a*cr + b*ci) >>> 5;
        si += (b*cr - a*ci) >>> 5;
      end
      host_read(512 + k, r);
      checks++;
      if (r.re !== 16'(s16(sr >>> 10)) || r.im !== 16'(s16(si >>> 10))) begin
        failures++; $display("FAIL F1 lag %0d got %0d,%0d exp %0d,%0d", k, r.re, r.im, sr >>> 10, si >>> 10);
      end
    end
    // ------------------------------------------------------------ check F2
    for (int t = 0; t < NBF; t++) begin
      int pr, pi_, er0, ei0, er1, ei1;
      pr  = fb[t].re * tw[t].re - fb[t].im * tw[t].im;
      pi_ = fb[t].re * tw[t].im + fb[t].im * tw[t].re;
      er0 = s16((((fa[t].re <<< 10) + (pr >>> 5))) >>> 10);
      ei0 = s16((((fa[t].im <<< 10) + (pi_ >>> 5))) >>> 10);
      er1 = s16((((fa[t].re <<< 10) + ((-pr) >>> 5))) >>> 10);
      ei1 = s16((((fa[t].im <<< 10) + ((-pi_) >>> 5))) >>> 10);
      host_read(600 + 2*t, r);
      checks++;
      if (r.re !== 16'(er0) || r.im !== 16'(ei0)) begin
        failures++; $display("FAIL F2 A' %0d got %0d,%0d exp %0d,%0d", t, r.re, r.im, er0, ei0);
      end
      host_read(601 + 2*t, r);
      checks++;
      if (r.re !== 16'(er1) || r.im !== 16'(ei1)) begin
        failures++; $display("FAIL F2 B' %0d got %0d,%0d exp %0d,%0d", t, r.re, r.im, er1, ei1);
      end
    end
    // ------------------------------------------------------------ check F3
    for (int j = 0; j < NCOR; j++) begin
      cplx_t v, z;
      real x, y, gm, gz, dz;
      v = ext_word(ext_s0 + j, 0);
      x = real'(v.re) / 32768.0; y = real'(v.im) / 32768.0;
      host_read(700 + 4*j, r);
      host_read(701 + 4*j, z);
      gm = real'(r.re) / 16384.0;
      gz = real'(z.re) * 3.14159265 / 32768.0;
      dz = gz - $atan2(y, x);
      if (dz > 3.14159265) dz -= 2*3.14159265;
      if (dz < -3.14159265) dz += 2*3.14159265;
      checks++;
      if (gm - K*$sqrt(x*x+y*y) > 0.008 || K*$sqrt(x*x+y*y) - gm > 0.008 || dz > 0.03 || dz < -0.03) begin
        failures++; $display("FAIL F3 %0d mag %f exp %f angle err %f", j, gm, K*$sqrt(x*x+y*y), dz);
      end else n_cordic++;
    end
    // ------------------------------------------------------------ check F5
    // Sample j is read in slow cycle j; its energy is written in cycle j+2
    // (address 800 + 4j), the running maximum in cycle j+4 (801 + 4(j+2)).
    // The packet sample PKT reaches the ALU in cycle PKT+5; the exception
    // ends the function after that cycle.
    n_f5 = 0;
    begin
      int best;
      best = 0;
      for (int j = 0; j < NSYNC; j++) begin
        int e;
        cplx_t m;
        e = s16(((sx[j].re * sx[j].re + sx[j].im * sx[j].im) >>> 5) >>> 4);
        host_read(800 + 4*j, r);
        if (j + 2 <= PKT + 5) begin
          checks++;
          if (r.re !== 16'(e) || r.im !== 16'(0)) begin
            failures++; $display("FAIL F5 energy %0d got %0d exp %0d", j, r.re, e);
          end
        end else begin
          checks++;
          if (r !== cplx_t'(32'hdead_beef)) begin
            failures++; $display("FAIL F5 written after the exception: %0d", j);
          end
        end
        if (j == 0 || e > best) best = e;
        if (j + 4 <= PKT + 5) begin
          host_read(801 + 4*(j+2), m);
          checks++;
          if (m.re !== 16'(best)) begin
            failures++; $display("FAIL F5 max %0d got %0d exp %0d", j, m.re, best);
          end
          if (m.im == 16'd1) n_ml_hit++;
        end
      end
    end

    // ------------------------------------------------------------ mechanisms
    $display("mechanisms: reconfigurations=%0d accumulate=%0d feedback=%0d external=%0d cordic=%0d ml_new_max=%0d exceptions=%0d",
             n_reconf, n_acc, n_fb, n_ext, n_cordic, n_ml_hit, n_exc);
    checks++;
    if (n_reconf != 5 || n_acc == 0 || n_fb == 0 || n_ext == 0 || n_cordic == 0 ||
        n_ml_hit == 0 || n_exc == 0 || !exc_seen) begin
      failures++; $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
