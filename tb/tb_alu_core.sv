// tb_alu_core: self-checking test of one ALU core.
// All 19 operations and NOP on random and corner operands; the expected
// result, write enable and comparison flag come from a reference written
// with 32-bit integer arithmetic.
module tb_alu_core;
  import bb_pkg::*;
  alu_instr_t instr;
  logic signed [15:0] a, b, result;
  logic we, is_cmp, cmp_true;
  int checks = 0, failures = 0;

  alu_core dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int x, y, r; bit w, c, t;
      instr = '{op: alu_op_e'(n % 21), rd: 3'($urandom), rs1: 3'($urandom), rs2: 3'($urandom)};
      case (n % 5)
        0: begin a = 16'($urandom); b = a; end
        1: begin a = 16'sh8000; b = 16'($urandom_range(0, 15)); end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      x = a; y = b; w = 1; c = 0; t = 0; r = 0;
      case (n % 21)
        1: r = x * (2 ** (y & 15));
        2: r = x >>> (y & 15);
        3: r = (x < 0) ? -x : x;
        4: r = x + y;   5: r = x - y;   6: r = x + 1;   7: r = x - 1;
        8:  begin c = 1; t = (x == y); end
        9:  begin c = 1; t = (x != y); end
        10: begin c = 1; t = (x >  y); end
        11: begin c = 1; t = (x >= y); end
        12: begin c = 1; t = (x <  y); end
        13: begin c = 1; t = (x <= y); end
        14: r = x & y;  15: r = x | y;  16: r = x ^ y;  17: r = ~x;
        18: r = ~(x & y); 19: r = ~(x | y);
        default: w = 0;
      endcase
      if (c) r = t;
      #1;
      checks++;
      if (we !== w || (w && result !== 16'(r)) || is_cmp !== c || cmp_true !== t) begin
        failures++;
        $display("FAIL op=%0d a=%0d b=%0d res=%0d exp %0d we=%0d cmp=%0d/%0d", n % 21, a, b, result, 16'(r), we, is_cmp, cmp_true);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
