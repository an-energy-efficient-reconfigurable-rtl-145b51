// baseband_top: reconfigurable baseband processor for flexible radios.
//
// Coarse-grained configurable units matched to per-degree-of-freedom
// processing: four DOF units (complex multiply-accumulate datapaths), a
// 10-stage CORDIC, an ML (maximum search) accelerator and a dual-core ALU,
// joined by a time-multiplexed crossbar made of two interconnect units, with
// a data memory and a coefficient memory, all sequenced by the control unit.
//
// Multi-rate operation: the crossbar, the memories, the ALU and the control
// unit run on clk (the fast clock); the DOF, CORDIC and ML units do one
// operation per slow cycle of four fast cycles (clock enable ce from the
// control unit). Each crossbar bus therefore carries four words (slots) per
// slow cycle. Timing of the stream through the array, counted in slow
// cycles of a running function: data read in slow cycle j (slot p at
// address ptr + p) is committed to the unit inputs in cycle j+1, computed by
// the units at the end of cycle j+1 with the soft bits of cycle j+1, and
// written back to the data memory in cycle j+2; a result fed back to the
// array is an input again in cycle j+3.
//
// Host interface (while busy is low): host_we with host_sel writes a word
// into the data, coefficient, configuration or ALU instruction memory;
// host_addr also reads the data memory (host_rdata one clock later). start
// runs the program at configuration word 0 until a halt instruction; done
// then rises. ext_in supplies the external data port, one word per fast
// cycle: the word applied while phase = p is slot p. out_valid / out_data
// show every word the array writes to the data memory. An assertion flags
// a host write while busy is high; such a write is ignored.
//
// The unit counts, the memory sizes and the crossbar organisation follow the
// description; the single clock with a clock enable in place of separate
// 200 MHz / 50 MHz clocks, and the port list, are own choices.
module baseband_top
  import bb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // host access
  input  logic          host_we,
  input  host_sel_e     host_sel,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  // program control
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          exc_seen,
  output logic [15:0]   n_functions,
  output logic [1:0]    phase,
  // external data
  input  cplx_t         ext_in,
  output logic          out_valid,
  output cplx_t         out_data
);
  hard_cfg_t          hard;
  logic               ce, running, agu_load, alu_run, exc;
  logic [NSOFT-1:0]   soft_bits;
  alu_instr_t [1:0]   alu_instr;

  control_unit u_ctrl (
    .clk, .rst_n, .start,
    .host_we_cfg(host_we && host_sel == HOST_CFG),
    .host_we_alu(host_we && host_sel == HOST_ALU),
    .host_addr, .host_wdata, .exc,
    .phase, .ce, .running, .agu_load, .hard, .soft_bits, .alu_run, .alu_instr,
    .busy, .done, .exc_seen, .n_functions
  );

  // ------------------------------------------------------------ memories
  logic [AW-1:0] dm_raddr, dm_waddr, cm_raddr;
  logic          mem_we;
  cplx_t         mem_wdata;
  logic [31:0]   dm_rdata, cm_rdata;

  mem_agu u_agu (
    .clk, .rst_n, .load(agu_load), .adv(ce), .phase, .cfg(hard.mem),
    .dm_raddr, .dm_waddr, .cm_raddr
  );

  data_mem #(.DEPTH(MEM_WORDS), .W(32)) u_dmem (
    .clk,
    .we   (busy ? mem_we : (host_we && host_sel == HOST_DM)),
    .waddr(busy ? dm_waddr : host_addr),
    .wdata(busy ? 32'(mem_wdata) : host_wdata),
    .raddr(busy ? dm_raddr : host_addr),
    .rdata(dm_rdata)
  );
  assign host_rdata = dm_rdata;

  coef_mem #(.DEPTH(MEM_WORDS), .W(32)) u_cmem (
    .clk,
    .we   (!busy && host_we && host_sel == HOST_CM),
    .addr (busy ? cm_raddr : host_addr),
    .wdata(host_wdata),
    .rdata(cm_rdata)
  );

  // ------------------------------------------------------------ crossbar
  cplx_t ext_q, fb_bus;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ext_q <= '0;
    else begin
      ext_q <= ext_in;
      // the host may load the memories only while the array is stopped
      a_host_idle: assert (!(busy && host_we))
        else $error("host write while the program is running");
    end

  cplx_t [3:0]      bus;
  cplx_t [NOPS-1:0] ops;
  cplx_t [NRES-1:0] res;

  always_comb begin
    bus[SRC_DM]  = cplx_t'(dm_rdata);
    bus[SRC_CM]  = cplx_t'(cm_rdata);
    bus[SRC_EXT] = ext_q;
    bus[SRC_FB]  = fb_bus;
  end

  icn_to_dp u_icn_to (
    .clk, .rst_n, .bus, .slot(phase - 2'd1), .commit(phase == 2'd0),
    .op_sel(hard.op_sel), .ops
  );

  icn_from_dp u_icn_from (
    .clk, .rst_n, .run(running), .phase, .cfg(hard.from_cfg), .res,
    .mem_we, .mem_wdata, .fb_bus
  );
  assign out_valid = mem_we;
  assign out_data  = mem_wdata;

  // ------------------------------------------------------------ units
  for (genvar k = 0; k < NDOF; k++) begin : g_dof
    dof_unit u_dof (
      .clk, .rst_n, .ce, .hard(hard.dof[k]), .acc(soft_bits[k]),
      .x0(ops[4*k]), .x1(ops[4*k+1]), .x2(ops[4*k+2]), .x3(ops[4*k+3]),
      .z1(res[3*k]), .z2(res[3*k+1]), .z3(res[3*k+2])
    );
  end

  logic signed [DW-1:0] cordic_z, ml_best, alu_out;
  logic                 ml_hit;

  cordic_unit u_cordic (
    .clk, .rst_n, .ce, .vec(hard.cordic_vec),
    .in_xy(ops[OP_CORDIC_XY]), .in_z(ops[OP_CORDIC_Z].re),
    .out_xy(res[RES_CORDIC_XY]), .out_z(cordic_z)
  );

  ml_unit u_ml (
    .clk, .rst_n, .ce, .ml_min(hard.ml_min), .restart(soft_bits[GRP_ML]),
    .in(ops[OP_ML].re), .best(ml_best), .hit(ml_hit)
  );

  dual_alu u_alu (
    .clk, .rst_n, .run(alu_run), .instr(alu_instr),
    .data_in(ops[OP_ALU].re), .data_out(alu_out), .exc
  );

  always_comb begin
    res[RES_CORDIC_Z] = '{re: cordic_z, im: '0};
    res[RES_ML]       = '{re: ml_best,  im: DW'(ml_hit)};
    res[RES_ALU]      = '{re: alu_out,  im: '0};
  end

endmodule
