// icn_to_dp: interconnect to the datapath (demultiplexing side of the
// time-multiplexed crossbar).
//
// Four narrow buses arrive at the fast rate, each carrying four words (slots)
// per slow cycle: the data-memory read bus, the coefficient-memory read bus,
// the external data port and the feedback bus from the interconnect from
// the datapath. The feedback bus is what lets unit outputs become unit
// inputs without a trip through memory, so units can be chained into
// pipelines. Every fast cycle the word on each bus is captured into the
// register of its slot (slot input). When the last slot is captured
// (commit) all sixteen words are copied into a hold bank, which stays
// stable for one slow cycle. Each unit operand then picks one of the sixteen
// held words (op_sel: bus and slot, 4 hard bits per operand).
//
// The time-multiplexed buses and demultiplexing at the unit inputs follow
// the description; the capture/hold organisation, the operand list and the
// select encoding are own choices. Latency: a word is available to the
// units from the fast cycle after the commit until the next commit.
module icn_to_dp
  import bb_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cplx_t [3:0]        bus,      // indexed by src_e
  input  logic [1:0]         slot,     // slot carried by the buses now
  input  logic               commit,   // capture the last slot and publish
  input  op_sel_t [NOPS-1:0] op_sel,
  output cplx_t [NOPS-1:0]   ops
);
  cplx_t [3:0][SLOTS-1:0] stage_q, hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= '0;
      hold_q  <= '0;
    end else begin
      for (int s = 0; s < 4; s++) begin
        stage_q[s][slot] <= bus[s];
        if (commit) begin
          for (int t = 0; t < SLOTS; t++)
            hold_q[s][t] <= (2'(t) == slot) ? bus[s] : stage_q[s][t];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NOPS; i++)
      ops[i] = hold_q[op_sel[i].src][op_sel[i].slot];
  end
endmodule
