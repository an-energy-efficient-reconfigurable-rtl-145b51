// tb_icn_to_dp: self-checking test of the interconnect to the datapath.
// Every slow cycle four random words per bus are sent slot by slot (the
// buses carry slot p-1 in phase p, as in the processor). After the commit
// each operand must show the word of the bus and slot it selects, and it
// must stay there for the whole next slow cycle while new words arrive.
module tb_icn_to_dp;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, commit = 0;
  cplx_t [3:0] bus;
  logic [1:0] slot = 0;
  op_sel_t [NOPS-1:0] op_sel;
  cplx_t [NOPS-1:0] ops;
  int checks = 0, failures = 0;
  cplx_t words [4][4];

  icn_to_dp dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0;
    for (int i = 0; i < NOPS; i++) op_sel[i] = op_sel_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 1000; c++) begin
      cplx_t nxt [4][4];
      for (int s = 0; s < 4; s++) for (int t = 0; t < 4; t++) nxt[s][t] = cplx_t'($urandom);
      for (int t = 0; t < 4; t++) begin
        slot = 2'(t);
        commit = (t == 3);
        for (int s = 0; s < 4; s++) bus[s] = nxt[s][t];
        #1;
        // the previous commit must still be visible
        if (c > 0) for (int i = 0; i < NOPS; i++) begin
          checks++;
          if (ops[i] !== words[op_sel[i].src][op_sel[i].slot]) begin
            failures++;
            $display("FAIL c=%0d t=%0d op %0d got %h exp %h", c, t, i, ops[i], words[op_sel[i].src][op_sel[i].slot]);
          end
        end
        @(negedge clk);
      end
      words = nxt;
      commit = 0;
      if (c % 50 == 49) for (int i = 0; i < NOPS; i++) op_sel[i] = op_sel_t'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
