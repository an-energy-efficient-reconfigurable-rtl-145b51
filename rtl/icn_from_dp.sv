// icn_from_dp: interconnect from the datapath (multiplexing side of the
// time-multiplexed crossbar).
//
// The registered outputs of all units (three per DOF unit, two of the
// CORDIC, one of the ML accelerator and one of the ALU) are stable for a
// whole slow cycle. In fast cycle (phase) p this unit puts one of them on
// each of two buses: the memory-write bus, written into the data memory in
// the same cycle when the slot's enable is set, and the feedback bus, which
// is registered (one fast cycle of latency) and goes back to the
// interconnect to the datapath. So per slow cycle up to four results go to
// memory and four return to the array.
//
// Its hard configuration (from_cfg_t) is 4 x 4 select bits for the memory
// slots, 4 write enables and 4 x 4 select bits for the feedback slots:
// 36 bits, the interconnect's count. The description does not give their
// meaning; this split is an own choice. The memory-write bus is also
// brought out of the processor as its data output.
module icn_from_dp
  import bb_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,      // a function is running
  input  logic [1:0]         phase,
  input  from_cfg_t          cfg,
  input  cplx_t [NRES-1:0]   res,
  output logic               mem_we,
  output cplx_t              mem_wdata,
  output cplx_t              fb_bus
);
  always_comb begin
    mem_wdata = res[cfg.mem_sel[phase]];
    mem_we    = run && cfg.mem_we[phase];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb_bus <= '0;
    else        fb_bus <= res[cfg.fb_sel[phase]];
  end
endmodule
