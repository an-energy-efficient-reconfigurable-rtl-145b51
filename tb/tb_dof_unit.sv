// tb_dof_unit: self-checking test of the DOF unit.
//
// Random hard configurations, inputs and accumulate/load bits are applied;
// an integer model of the datapath (written independently with 32-bit int
// arithmetic) predicts z1, z2 and z3 one enabled clock later. Cycles with
// ce low must leave the outputs unchanged. A directed part computes a
// 16-tap complex cross-correlation sum(x[n] * conj(h[n])) using the
// j x* / -j x operator pair and checks it against a direct sum, and checks
// the one-slow-cycle latency.
module tb_dof_unit;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, acc = 0;
  dof_hard_t hard;
  cplx_t x0, x1, x2, x3, z1, z2, z3;
  int checks = 0, failures = 0;

  dof_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void mcop(input int r, input int i, input int s, output int orr, output int oi);
    case (s)
      1: begin orr = -r; oi = -i; end
      2: begin orr = -i; oi =  r; end
      3: begin orr =  i; oi = -r; end
      4: begin orr =  i; oi =  r; end
      5: begin orr = -i; oi = -r; end
      default: begin orr = r; oi = i; end
    endcase
  endfunction
  function automatic int wrap16(input int v); return (v << 16) >>> 16; endfunction
  function automatic int wrap27(input int v); return (v << 5) >>> 5; endfunction
  function automatic int s16(input longint v);
    if (v > 32767) return 32767; if (v < -32768) return -32768; return int'(v);
  endfunction

  int acc_r = 0, acc_i = 0;   // model accumulator
  int e1r, e1i, e2r, e2i, e3r, e3i;

  task automatic model_step();
    int a1r, a1i, pr, pi_, pcr, pci, b2r, b2i, b3r, b3i, ar, ai, sr, si, hr, hi;
    mcop(x1.re, x1.im, hard.cop_x1, a1r, a1i);
    a1r = wrap16(a1r); a1i = wrap16(a1i);
    pr  = x0.re * a1r - x0.im * a1i;
    pi_ = x0.re * a1i + x0.im * a1r;
    mcop(pr, pi_, hard.cop_p, pcr, pci);
    mcop(x2.re, x2.im, hard.cop_x2, b2r, b2i);
    b2r = wrap16(b2r); b2i = wrap16(b2i);
    mcop(x3.re, x3.im, hard.cop_x3, b3r, b3i);
    b3r = wrap16(b3r); b3i = wrap16(b3i);
    ar  = acc ? acc_r : wrap27(b2r << hard.x2_shift);
    ai  = acc ? acc_i : wrap27(b2i << hard.x2_shift);
    sr  = wrap27(ar + (pcr >>> 5));
    si  = wrap27(ai + (pci >>> 5));
    acc_r = sr; acc_i = si;
    hr = sr >>> hard.shift; hi = si >>> hard.shift;
    e2r = s16(hr); e2i = s16(hi);
    e1r = s16(longint'(hr) + b3r); e1i = s16(longint'(hi) + b3i);
    e3r = s16(pr >>> 15); e3i = s16(pi_ >>> 15);
  endtask

  task automatic check_out(input string what);
    checks++;
    if (z1.re !== 16'(e1r) || z1.im !== 16'(e1i) || z2.re !== 16'(e2r) ||
        z2.im !== 16'(e2i) || z3.re !== 16'(e3r) || z3.im !== 16'(e3i)) begin
      failures++;
      $display("FAIL %s: z1=%0d,%0d exp %0d,%0d z2=%0d,%0d exp %0d,%0d z3=%0d,%0d exp %0d,%0d",
               what, z1.re, z1.im, e1r, e1i, z2.re, z2.im, e2r, e2i, z3.re, z3.im, e3r, e3i);
    end
  endtask

  function automatic cplx_t rnd_c(); cplx_t c; c.re = 16'($urandom); c.im = 16'($urandom); return c; endfunction

  initial begin
    hard = '0; x0 = '0; x1 = '0; x2 = '0; x3 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- random operation
    for (int n = 0; n < 3000; n++) begin
      if (n % 16 == 0) begin
        hard.cop_x1 = cop_e'($urandom_range(0, 5));
        hard.cop_x2 = cop_e'($urandom_range(0, 5));
        hard.cop_x3 = cop_e'($urandom_range(0, 5));
        hard.cop_p  = cop_e'($urandom_range(0, 5));
        hard.shift  = 5'($urandom_range(0, 26));
        hard.x2_shift = 4'($urandom_range(0, 15));
      end
      x0 = rnd_c(); x1 = rnd_c(); x2 = rnd_c(); x3 = rnd_c();
      if (n % 7 == 3) begin
        x0.re = 16'sh8000; x1 = '{re: 16'sh8000, im: 16'sh7fff};
      end
      acc = ($urandom_range(0, 3) != 0) && (n % 16 != 0);
      ce  = ($urandom_range(0, 4) != 0);
      if (ce) model_step();
      @(negedge clk);
      check_out(ce ? "random" : "hold");
    end
    // ---- 16-tap cross-correlation, 1 slow cycle = 4 clocks
    begin
      int sr = 0, si = 0;
      hard = '{cop_x1: COP_JC, cop_x2: COP_X, cop_x3: COP_X, cop_p: COP_NJ, shift: 5'd10, x2_shift: 4'd0};
      ce = 0;
      for (int n = 0; n < 16; n++) begin
        x0 = '{re: 16'($urandom_range(0, 8000) - 4000), im: 16'($urandom_range(0, 8000) - 4000)};
        x1 = '{re: 16'($urandom_range(0, 8000) - 4000), im: 16'($urandom_range(0, 8000) - 4000)};
        x2 = '0; x3 = '0;
        acc = (n != 0);
        sr += (x0.re * x1.re + x0.im * x1.im) >>> 5;
        si += (x0.im * x1.re - x0.re * x1.im) >>> 5;
        repeat (3) @(negedge clk);
        ce = 1; @(negedge clk); ce = 0;
        checks++;   // latency: the result of this sample is visible now
        if (z2.re !== 16'(s16(sr >>> 10)) || z2.im !== 16'(s16(si >>> 10))) begin
          failures++;
          $display("FAIL xcorr n=%0d got %0d,%0d exp %0d,%0d", n, z2.re, z2.im, sr >>> 10, si >>> 10);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
