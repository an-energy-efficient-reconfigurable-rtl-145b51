// tb_coef_mem: self-checking test of the single-port coefficient memory.
// Random writes and reads over all 2048 words against a model; read data is
// checked one clock after the read, and a write cycle must not change the
// read data register.
module tb_coef_mem;
  logic clk = 0, we = 0;
  logic [10:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [2048];

  coef_mem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] last;
    for (int a = 0; a < 2048; a++) begin
      we = 1; addr = 11'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    last = rdata;
    for (int n = 0; n < 10000; n++) begin
      we = ($urandom_range(0, 2) == 0);
      addr = 11'($urandom);
      wdata = $urandom;
      if (we) model[addr] = wdata;
      else    last = model[addr];
      @(negedge clk);
      checks++;
      if (rdata !== last) begin
        failures++; $display("FAIL addr %0d got %h exp %h", addr, rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
