// data_mem: data memory with one read port and one write port that work in
// the same cycle.
//
// DEPTH words of W bits; the default 2048 x 32 bits is the 8 KB of the
// prototype, one complex sample per word. Both ports are synchronous: a
// write lands at the clock edge, and read data appears one cycle after the
// read address (a read of the address being written returns the old word).
// The memory runs at the fast (interconnect) clock. The array is written as
// a plain memory so that a tool can map it to an SRAM macro; its contents
// are not reset. The same module also holds the control unit's
// configuration memory and ALU instruction memory, which are 8 KB each.
module data_mem #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
