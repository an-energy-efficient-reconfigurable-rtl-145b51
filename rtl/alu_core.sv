// alu_core: one 16-bit core of the dual-core ALU (combinational).
//
// Decodes a 14-bit instruction {op[4:0], rd[2:0], rs1[2:0], rs2[2:0]} and
// computes the result from the two source values a (rs1) and b (rs2). The
// core has the four sections of the block diagram: a left/right shifter,
// an arithmetic section, a compare section fed by the arithmetic section
// (comparisons are made on the 17-bit difference a - b), and a logic
// section. The 19 operations are the listed ones: shift left, shift right,
// absolute value, add, subtract, increment, decrement, six comparisons
// (EQ NE GT GE LT LE, signed) and six logical operations (AND OR XOR NOT
// NAND NOR). Their codes, the NOP code 0, the register fields, arithmetic
// (not logical) right shift, wrap-around arithmetic, the shift amount
// b[3:0] and the 0/1 result of a comparison are own choices.
// Outputs: result, we (the operation writes rd), is_cmp and cmp_true.
module alu_core
  import bb_pkg::*;
(
  input  alu_instr_t           instr,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  output logic signed [DW-1:0] result,
  output logic                 we,
  output logic                 is_cmp,
  output logic                 cmp_true
);
  logic signed [DW:0] diff;
  logic eq, lt;

  always_comb begin
    diff = {a[DW-1], a} - {b[DW-1], b};
    eq   = (a == b);
    lt   = diff[DW];
    result   = '0;
    we       = 1'b1;
    is_cmp   = 1'b0;
    cmp_true = 1'b0;
    unique case (instr.op)
      OP_SHL:  result = a <<  b[3:0];
      OP_SHR:  result = a >>> b[3:0];
      OP_ABS:  result = a[DW-1] ? -a : a;
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_INC:  result = a + 16'sd1;
      OP_DEC:  result = a - 16'sd1;
      OP_EQ, OP_NE, OP_GT, OP_GE, OP_LT, OP_LE: begin
        is_cmp = 1'b1;
        unique case (instr.op)
          OP_EQ:   cmp_true = eq;
          OP_NE:   cmp_true = !eq;
          OP_GT:   cmp_true = !lt && !eq;
          OP_GE:   cmp_true = !lt;
          OP_LT:   cmp_true = lt;
          default: cmp_true = lt || eq;    // OP_LE
        endcase
        result = {{(DW-1){1'b0}}, cmp_true};
      end
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_NOT:  result = ~a;
      OP_NAND: result = ~(a & b);
      OP_NOR:  result = ~(a | b);
      default: we = 1'b0;                  // OP_NOP and unused codes
    endcase
  end
endmodule
