// ml_unit: maximum-likelihood (ML) accelerator.
//
// A running extreme-value search over a stream of 16-bit metrics, e.g. the
// correlation outputs of the DOF units during synchronisation. Each slow
// cycle the adder forms d = in - best, two sign tests give d > 0 and d < 0,
// and a multiplexer picks one of them (hard bit ml_min: 0 maximum search,
// 1 minimum search). The picked flag steers the multiplexer in front of the
// register: on a new extreme the register takes the input, otherwise it
// keeps its value. The soft bit restart loads the input unconditionally and
// starts a new search.
//
// Structure (one subtractor, the >0 / <0 tests, the output multiplexer, the
// register with its input multiplexer and feedback) follows the schematic;
// the restart bit, the 16-bit width and registering the flag with the value
// (latency one slow cycle) are own choices. Outputs: best (current extreme)
// and hit (the last sample was a new extreme).
module ml_unit
  import bb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,       // slow-cycle enable
  input  logic                 ml_min,   // hard control
  input  logic                 restart,  // soft control
  input  logic signed [DW-1:0] in,
  output logic signed [DW-1:0] best,
  output logic                 hit
);
  logic signed [DW:0] diff;
  logic gt, lt, sel;

  always_comb begin
    diff = {in[DW-1], in} - {best[DW-1], best};
    gt   = !diff[DW] && (diff != '0);
    lt   = diff[DW];
    sel  = ml_min ? lt : gt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best <= '0;
      hit  <= 1'b0;
    end else if (ce) begin
      if (restart || sel) best <= in;
      hit <= restart || sel;
    end
  end
endmodule
