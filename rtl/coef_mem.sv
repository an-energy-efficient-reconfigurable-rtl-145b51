// coef_mem: coefficient memory with a single read/write port.
//
// DEPTH words of W bits; the default 2048 x 32 bits is the 8 KB of the
// prototype. One access per fast clock: a write when we is high, otherwise
// a read whose data appears one cycle later. Filter taps, twiddle factors
// and training sequences live here; in this design the host writes it and
// the array reads it. Contents are not reset.
module coef_mem #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata <= mem[addr];
  end
endmodule
