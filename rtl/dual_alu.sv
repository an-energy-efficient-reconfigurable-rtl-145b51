// dual_alu: dual-core ALU for miscellaneous arithmetic and asynchronous
// control.
//
// Two alu_core instances work in MIMD fashion: each receives its own 14-bit
// instruction every fast cycle (28 soft-control bits in all) and both share
// one register file. Register r7 is the port to the crossbar: reading r7
// gives the unit's operand from the interconnect (data_in), writing r7 sets
// the unit's output (data_out). A comparison whose destination is r7 and
// whose result is true raises exc for one cycle: this is the exception the
// ALU sends to the control unit, e.g. when a packet has been detected.
//
// The two cores, the shared registers and the 16-bit width follow the
// description; the eight-register file, the r7 port convention, the
// exception rule and core 1 winning when both cores write the same register
// in the same cycle are own choices. Each instruction reads its operands and
// writes its result in the same fast cycle (results visible one fast cycle
// later). Register writes only happen while run is high.
module dual_alu
  import bb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  alu_instr_t [1:0]     instr,
  input  logic signed [DW-1:0] data_in,
  output logic signed [DW-1:0] data_out,
  output logic                 exc
);
  logic signed [DW-1:0] regs [ALU_NREG-1];   // r0..r6
  logic signed [DW-1:0] a [2], b [2], res [2];
  logic we [2], is_cmp [2], cmp_true [2];

  function automatic logic signed [DW-1:0] rd_reg(input logic [2:0] idx,
      input logic signed [DW-1:0] r [ALU_NREG-1], input logic signed [DW-1:0] port);
    return (idx == ALU_PORT) ? port : r[idx];
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_core
    always_comb begin
      a[c] = rd_reg(instr[c].rs1, regs, data_in);
      b[c] = rd_reg(instr[c].rs2, regs, data_in);
    end
    alu_core u_core (
      .instr(instr[c]), .a(a[c]), .b(b[c]), .result(res[c]),
      .we(we[c]), .is_cmp(is_cmp[c]), .cmp_true(cmp_true[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ALU_NREG-1; i++) regs[i] <= '0;
      data_out <= '0;
      exc      <= 1'b0;
    end else begin
      exc <= 1'b0;
      if (run) begin
        for (int c = 0; c < 2; c++) begin
          if (we[c]) begin
            if (instr[c].rd == ALU_PORT) data_out <= res[c];
            else                         regs[instr[c].rd] <= res[c];
            if (is_cmp[c] && cmp_true[c] && instr[c].rd == ALU_PORT) exc <= 1'b1;
          end
        end
      end
    end
  end
endmodule
