// tb_cop: self-checking test of the complex operator COP.
// Every code is applied to random inputs and to the extreme values; the
// expected result is formed by multiplying x or x* with 1, -1, j or -j in
// integer complex arithmetic.
module tb_cop;
  import bb_pkg::*;
  logic [2:0] sel;
  logic signed [15:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;
  cop #(.W(16)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int a, b, cr, ci, fr, fi, er, ei;
      sel   = 3'(n % 8);
      in_re = (n < 16) ? 16'sh7fff : 16'($urandom);
      in_im = (n < 16) ? -16'sh7fff : 16'($urandom);
      a = in_re; b = in_im;
      // x or its conjugate, then a factor 1, -1, j, -j
      cr = a; ci = (sel == 4 || sel == 5) ? -b : b;
      case (sel)
        1: begin fr = -1; fi = 0; end
        2, 4: begin fr = 0; fi = 1; end
        3, 5: begin fr = 0; fi = -1; end
        default: begin fr = 1; fi = 0; end
      endcase
      er = cr * fr - ci * fi;
      ei = cr * fi + ci * fr;
      #1;
      checks++;
      if (out_re !== 16'(er) || out_im !== 16'(ei)) begin
        failures++;
        $display("FAIL sel=%0d in=%0d,%0d out=%0d,%0d exp %0d,%0d", sel, a, b, out_re, out_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
