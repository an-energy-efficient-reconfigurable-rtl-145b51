// tb_ml_unit: self-checking test of the ML accelerator.
// Random metric streams with random restarts, in maximum and minimum mode;
// a behavioural running-extreme model gives the expected best value and the
// new-extreme flag one enabled clock after each sample. Clocks without ce
// must change nothing.
module tb_ml_unit;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, ml_min = 0, restart = 0;
  logic signed [15:0] in, best;
  logic hit;
  int checks = 0, failures = 0;
  int m_best = 0; bit m_hit = 0;

  ml_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      if (n % 500 == 0) ml_min = ~ml_min;
      restart = (n % 500 == 0) || ($urandom_range(0, 60) == 0);
      in = (n % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 200) - 100);
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        bit better;
        better = ml_min ? (int'(in) < m_best) : (int'(in) > m_best);
        m_hit = restart || better;
        if (m_hit) m_best = in;
      end
      @(negedge clk);
      checks++;
      if (best !== 16'(m_best) || hit !== m_hit) begin
        failures++;
        $display("FAIL n=%0d min=%0d best=%0d exp %0d hit=%0d exp %0d", n, ml_min, best, m_best, hit, m_hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
