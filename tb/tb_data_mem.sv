// tb_data_mem: self-checking test of the 1R1W data memory.
// Random simultaneous reads and writes over the full 2048 words against an
// associative-array model; read data is checked one clock after its
// address, and a read of the word being written must return the old value.
module tb_data_mem;
  logic clk = 0, we = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [2048];

  data_mem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_q;
    // fill the whole memory
    for (int a = 0; a < 2048; a++) begin
      we = 1; waddr = 11'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 10000; n++) begin
      we    = $urandom_range(0, 1);
      waddr = 11'($urandom);
      wdata = $urandom;
      raddr = (n % 4 == 0) ? waddr : 11'($urandom);
      exp_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++; $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
