// bb_pkg: types and constants shared by the reconfigurable baseband processor.
//
// The processor is an array of coarse-grained configurable units (four DOF
// units, a CORDIC, an ML accelerator and a dual-core ALU) joined by a
// time-multiplexed crossbar. Every datapath word is a complex number with
// 16-bit real and imaginary parts, as the DOF unit uses. The array runs at
// one quarter of the interconnect/memory rate: one "slow cycle" is
// SLOTS = 4 "fast cycles", and each crossbar bus carries one word per fast
// cycle, i.e. four slots per slow cycle.
//
// The unit counts, data widths, memory sizes (8 KB each), the COP operator
// set, the 21 hard bits of a DOF unit, the ALU's 19 operations and 14-bit
// instruction follow the design description. The field encodings (COP codes,
// opcode numbers, the layout of the configuration word, the crossbar select
// codes) are this implementation's own choices.
package bb_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DW      = 16;  // real / imaginary part width
  localparam int unsigned SLOTS   = 4;   // fast cycles per slow cycle
  localparam int unsigned NDOF    = 4;   // DOF units in the prototype
  localparam int unsigned AW      = 11;  // word address: 2048 x 32 bit = 8 KB
  localparam int unsigned MEM_WORDS = 2048;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // ---------------------------------------------------------------- COP
  // Complex operator applied to DOF inputs and to the product.
  typedef enum logic [2:0] {
    COP_X     = 3'd0,   //  x
    COP_NEG   = 3'd1,   // -x
    COP_J     = 3'd2,   //  j x
    COP_NJ    = 3'd3,   // -j x
    COP_JC    = 3'd4,   //  j x*
    COP_NJC   = 3'd5    // -j x*
  } cop_e;

  // ---------------------------------------------------------------- DOF
  // 21 hard-control bits per DOF unit.
  typedef struct packed {
    cop_e       cop_x1;    // operator on multiplier input x1
    cop_e       cop_x2;    // operator on accumulator-load input x2
    cop_e       cop_x3;    // operator on output-adder input x3
    cop_e       cop_p;     // operator on the complex product
    logic [4:0] shift;     // arithmetic right shift of the accumulator sum
    logic [3:0] x2_shift;  // left alignment of x2 into the 27-bit accumulator
  } dof_hard_t;

  localparam int unsigned DOF_PW  = 32;  // product width after the COP
  localparam int unsigned DOF_AW  = 27;  // accumulator width

  // ---------------------------------------------------------------- ALU
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_SHL  = 5'd1,  OP_SHR  = 5'd2,
    OP_ABS  = 5'd3,  OP_ADD  = 5'd4,  OP_SUB  = 5'd5,
    OP_INC  = 5'd6,  OP_DEC  = 5'd7,
    OP_EQ   = 5'd8,  OP_NE   = 5'd9,  OP_GT   = 5'd10,
    OP_GE   = 5'd11, OP_LT   = 5'd12, OP_LE   = 5'd13,
    OP_AND  = 5'd14, OP_OR   = 5'd15, OP_XOR  = 5'd16,
    OP_NOT  = 5'd17, OP_NAND = 5'd18, OP_NOR  = 5'd19
  } alu_op_e;

  typedef struct packed {
    alu_op_e    op;
    logic [2:0] rd;
    logic [2:0] rs1;
    logic [2:0] rs2;
  } alu_instr_t;                          // 14 bits

  localparam int unsigned ALU_NREG = 8;   // r7 = input port (read) / output port (write)
  localparam logic [2:0]  ALU_PORT = 3'd7;

  // ---------------------------------------------------------------- crossbar
  // Sources of the interconnect to the datapath: four buses of four slots.
  typedef enum logic [1:0] {
    SRC_DM  = 2'd0,   // data memory read bus
    SRC_CM  = 2'd1,   // coefficient memory read bus
    SRC_EXT = 2'd2,   // external data port
    SRC_FB  = 2'd3    // feedback bus from the interconnect from datapath
  } src_e;

  typedef struct packed {
    src_e       src;
    logic [1:0] slot;
  } op_sel_t;                              // 4 bits per operand

  // Operands delivered to the units (index into the operand vector).
  localparam int unsigned NOPS      = 4*NDOF + 4;
  localparam int unsigned OP_CORDIC_XY = 4*NDOF;      // x + jy
  localparam int unsigned OP_CORDIC_Z  = 4*NDOF + 1;  // angle in .re
  localparam int unsigned OP_ML        = 4*NDOF + 2;  // metric in .re
  localparam int unsigned OP_ALU       = 4*NDOF + 3;  // data in .re

  // Unit outputs seen by the interconnect from the datapath.
  localparam int unsigned NRES       = 3*NDOF + 4;    // 16
  localparam int unsigned RES_CORDIC_XY = 3*NDOF;
  localparam int unsigned RES_CORDIC_Z  = 3*NDOF + 1;
  localparam int unsigned RES_ML        = 3*NDOF + 2;
  localparam int unsigned RES_ALU       = 3*NDOF + 3;
  localparam int unsigned RSW        = $clog2(NRES);  // 4

  // 36 hard bits of the interconnect from the datapath.
  typedef struct packed {
    logic [SLOTS-1:0][RSW-1:0] mem_sel;  // result written to memory in slot s
    logic [SLOTS-1:0]          mem_we;   // write enable of slot s
    logic [SLOTS-1:0][RSW-1:0] fb_sel;   // result fed back in slot s
  } from_cfg_t;

  // Memory address generation.
  typedef struct packed {
    logic [AW-1:0] rd_base;   // data memory read pointer start
    logic [3:0]    rd_step;   // pointer increment per slow cycle
    logic [AW-1:0] wr_base;   // data memory write pointer start
    logic [3:0]    wr_step;
    logic [AW-1:0] cm_base;   // coefficient memory read pointer start
    logic [3:0]    cm_step;
  } mem_cfg_t;

  // Complete hard configuration of the array.
  typedef struct packed {
    dof_hard_t [NDOF-1:0]  dof;
    logic                  cordic_vec;  // 0 rotation (polar->rect), 1 vectoring
    logic                  ml_min;      // 0 maximum search, 1 minimum search
    op_sel_t [NOPS-1:0]    op_sel;
    from_cfg_t             from_cfg;
    mem_cfg_t              mem;
  } hard_cfg_t;

  localparam int unsigned HARD_BITS  = $bits(hard_cfg_t);
  localparam int unsigned CFG_WORDS  = (HARD_BITS + 31) / 32;
  localparam int unsigned HDR_WORDS  = 2;
  localparam int unsigned INSTR_WORDS = HDR_WORDS + CFG_WORDS;

  // Soft-control groups (variable-length part): DOF0..3 and ML use one bit
  // each from the configuration stream; the ALU group is fetched from the
  // ALU instruction memory.
  localparam int unsigned NSOFT      = NDOF + 1;
  localparam int unsigned NGROUPS    = NDOF + 2;
  localparam int unsigned GRP_ML     = NDOF;
  localparam int unsigned GRP_ALU    = NDOF + 1;

  // Host access selects.
  typedef enum logic [1:0] {
    HOST_DM  = 2'd0,
    HOST_CM  = 2'd1,
    HOST_CFG = 2'd2,
    HOST_ALU = 2'd3
  } host_sel_e;

  // ---------------------------------------------------------------- helpers
  function automatic logic signed [DW-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

endpackage
