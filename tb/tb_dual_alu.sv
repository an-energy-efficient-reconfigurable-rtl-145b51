// tb_dual_alu: self-checking test of the dual-core ALU.
// Random instruction pairs run against a model of the shared register file
// (r7 reads data_in and writes data_out, core 1 wins a write conflict). A
// comparison that is true and targets r7 must raise exc in the next cycle.
// A directed sequence then detects a threshold crossing of the input, as a
// packet-detection loop would.
module tb_dual_alu;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  alu_instr_t [1:0] instr;
  logic signed [15:0] data_in, data_out;
  logic exc;
  int checks = 0, failures = 0;
  int r [8];
  int m_out = 0; bit m_exc = 0;

  dual_alu dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ex(input alu_instr_t i, input int x, input int y, output bit w, output bit t);
    int v = 0; w = 1; t = 0;
    case (i.op)
      OP_SHL: v = x <<< (y & 15);  OP_SHR: v = x >>> (y & 15);
      OP_ABS: v = (x < 0) ? -x : x;
      OP_ADD: v = x + y; OP_SUB: v = x - y; OP_INC: v = x + 1; OP_DEC: v = x - 1;
      OP_EQ: begin t = x == y; v = t; end  OP_NE: begin t = x != y; v = t; end
      OP_GT: begin t = x >  y; v = t; end  OP_GE: begin t = x >= y; v = t; end
      OP_LT: begin t = x <  y; v = t; end  OP_LE: begin t = x <= y; v = t; end
      OP_AND: v = x & y; OP_OR: v = x | y; OP_XOR: v = x ^ y; OP_NOT: v = ~x;
      OP_NAND: v = ~(x & y); OP_NOR: v = ~(x | y);
      default: w = 0;
    endcase
    return (v <<< 16) >>> 16;
  endfunction

  task automatic step();
    int v [2]; bit w [2], t [2];
    bit e = 0;
    for (int c = 0; c < 2; c++) begin
      int x, y;
      x = (instr[c].rs1 == 7) ? int'(data_in) : r[instr[c].rs1];
      y = (instr[c].rs2 == 7) ? int'(data_in) : r[instr[c].rs2];
      v[c] = ex(instr[c], x, y, w[c], t[c]);
    end
    if (run) for (int c = 0; c < 2; c++) if (w[c]) begin
      if (instr[c].rd == 7) begin
        m_out = v[c];
        if (instr[c].op inside {[OP_EQ:OP_LE]} && t[c]) e = 1;
      end else r[instr[c].rd] = v[c];
    end
    m_exc = e;
  endtask

  task automatic compare();
    checks++;
    if (data_out !== 16'(m_out) || exc !== m_exc) begin
      failures++;
      $display("FAIL out=%0d exp %0d exc=%0d exp %0d", data_out, m_out, exc, m_exc);
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (dut.regs[i] !== 16'(r[i])) begin
        failures++; $display("FAIL r%0d=%0d exp %0d", i, dut.regs[i], r[i]);
      end
    end
  endtask

  initial begin
    int n_exc = 0;
    for (int i = 0; i < 8; i++) r[i] = 0;
    instr = '0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      run = ($urandom_range(0, 9) != 0);
      for (int c = 0; c < 2; c++)
        instr[c] = '{op: alu_op_e'($urandom_range(0, 19)), rd: 3'($urandom), rs1: 3'($urandom), rs2: 3'($urandom)};
      data_in = ($urandom_range(0, 1) == 0) ? 16'($urandom_range(0, 10)) : 16'($urandom);
      step();
      @(negedge clk);
      compare();
      if (exc) n_exc++;
    end
    checks++;
    if (n_exc == 0) begin failures++; $display("FAIL no exception seen"); end
    // Threshold detection: r1 = 100, core 0 copies the input to r2,
    // core 1 raises the exception when the input exceeds r1.
    run = 1;
    instr[0] = '{op: OP_XOR, rd: 3'd0, rs1: 3'd0, rs2: 3'd0};   // r0 = 0
    instr[1] = '{op: OP_XOR, rd: 3'd1, rs1: 3'd1, rs2: 3'd1};   // r1 = 0
    @(negedge clk);
    instr[1] = '{op: OP_NOP, rd: 3'd0, rs1: 3'd0, rs2: 3'd0};
    for (int k = 0; k < 100; k++) begin
      instr[0] = '{op: OP_INC, rd: 3'd1, rs1: 3'd1, rs2: 3'd0};
      @(negedge clk);
    end
    for (int k = 0; k < 200; k++) begin
      data_in  = 16'(k);
      instr[0] = '{op: OP_ADD, rd: 3'd2, rs1: 3'd7, rs2: 3'd0};
      instr[1] = '{op: OP_GT,  rd: 3'd7, rs1: 3'd7, rs2: 3'd1};
      @(negedge clk);
      checks++;
      if (exc !== (k > 100) || dut.regs[2] !== 16'(k)) begin
        failures++; $display("FAIL threshold k=%0d exc=%0d r2=%0d", k, exc, dut.regs[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
