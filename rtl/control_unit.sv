// control_unit: program sequencer of the reconfigurable processor.
//
// A program is a list of functions (FFT, FIR filter, correlation, ...). Each
// function begins with a fixed-length hard instruction that sets all hard
// control bits of the array for the whole function and says which soft
// control groups are active; during the function the active soft bits are
// updated every slow cycle from a variable-length stream that stores only
// the active groups. The dual-core ALU's soft bits (two 14-bit instructions
// per fast cycle) come from their own instruction memory. An exception from
// the ALU can end a function early (asynchronous control, e.g. on packet
// detection). The unit also generates the rate relation of the multi-rate
// array: a free-running phase counts the four fast cycles of a slow cycle,
// and ce marks the last fast cycle of each running slow cycle.
//
// Memory image in the configuration memory (2048 x 32 bits, 8 KB), own
// format:
//   word 0  [31:30] op (0 halt, 1 run)  [29] stop on exception
//           [28:23] group enables {ALU, ML, DOF3..DOF0}  [15:0] slow cycles
//   word 1  [10:0] ALU program start  [18:11] ALU program length
//   words 2 .. 2+CFG_WORDS-1  hard_cfg_t, least significant word first
//   then the soft stream: for each slow cycle, one bit per enabled group in
//   the order DOF0..DOF3, ML, packed from bit 0 of the next word upwards;
//   the next function starts at the word after the stream.
// The ALU program (one word per fast cycle, core 0 in [13:0], core 1 in
// [27:14]) repeats from its start while the function runs.
//
// The split into hard and soft control, the fixed/variable instruction
// lengths, the two 8 KB memories and the exception follow the description;
// the formats, the state machine and its timing are own choices. A function
// starts on a slow-cycle boundary after its instruction has been fetched;
// fetching takes about INSTR_WORDS + 10 fast cycles during which the array
// is idle. The host writes both memories while the unit is idle, then
// pulses start; done is high when a halt instruction has been reached.
module control_unit
  import bb_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               host_we_cfg,
  input  logic               host_we_alu,
  input  logic [AW-1:0]      host_addr,
  input  logic [31:0]        host_wdata,
  input  logic               exc,
  output logic [1:0]         phase,
  output logic               ce,
  output logic               running,
  output logic               agu_load,
  output hard_cfg_t          hard,
  output logic [NSOFT-1:0]   soft_bits,
  output logic               alu_run,
  output alu_instr_t [1:0]   alu_instr,
  output logic               busy,
  output logic               done,
  output logic               exc_seen,
  output logic [15:0]        n_functions
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_PRIME, S_WAIT, S_RUN} state_e;
  state_e state;

  // ----------------------------------------------------------- memories
  logic [AW-1:0] cfg_raddr, alu_raddr;
  logic [31:0]   cfg_rdata, alu_rdata;

  data_mem #(.DEPTH(MEM_WORDS), .W(32)) u_cfg_mem (
    .clk, .we(host_we_cfg && !busy), .waddr(host_addr), .wdata(host_wdata),
    .raddr(cfg_raddr), .rdata(cfg_rdata));
  data_mem #(.DEPTH(MEM_WORDS), .W(32)) u_alu_mem (
    .clk, .we(host_we_alu && !busy), .waddr(host_addr), .wdata(host_wdata),
    .raddr(alu_raddr), .rdata(alu_rdata));

  // ----------------------------------------------------------- registers
  logic [AW-1:0]   pc, sptr, next_pc;
  logic [31:0]     iw [INSTR_WORDS];
  logic [4:0]      fa;           // fetch address index
  logic            rd_pend;      // a configuration word arrives this cycle
  logic [4:0]      rd_idx;       // index of that word (31: soft stream)
  logic [63:0]     sbuf;
  logic [6:0]      slevel;
  logic [15:0]     cnt;
  logic [NGROUPS-1:0] mask;
  logic            stop_exc, exc_fn, armed;
  logic [AW-1:0]   alu_pc, alu_base, alu_pc_n;
  logic [7:0]      alu_len;
  hard_cfg_t       stage_cfg;

  // Number of soft bits per slow cycle and their extraction.
  function automatic logic [2:0] soft_width(input logic [NGROUPS-1:0] m);
    logic [2:0] w = '0;
    for (int i = 0; i < NSOFT; i++) w += 3'(m[i]);
    return w;
  endfunction

  function automatic logic [NSOFT-1:0] soft_take(input logic [NGROUPS-1:0] m,
                                                  input logic [63:0] b);
    logic [NSOFT-1:0] s = '0;
    int k = 0;
    for (int i = 0; i < NSOFT; i++)
      if (m[i]) begin s[i] = b[k]; k++; end
    return s;
  endfunction

  logic [2:0] sw;
  assign sw = soft_width(mask);

  // Length of the soft stream of the fetched function, in words.
  logic [20:0] stream_bits;
  logic [15:0] stream_words;
  always_comb begin
    stream_bits  = 21'(iw[0][15:0]) * 21'(soft_width(iw[0][28:23])) + 21'd31;
    stream_words = stream_bits[20:5];
  end

  logic [INSTR_WORDS*32-1:0] iw_flat;
  always_comb
    for (int i = 0; i < INSTR_WORDS; i++) iw_flat[i*32 +: 32] = iw[i];

  logic go;      // first edge of a function
  logic last;    // last edge of a function
  assign go   = (state == S_WAIT) && armed && (phase == 2'd3);
  assign last = (state == S_RUN) && (phase == 2'd3) &&
                ((cnt == 16'd1) || (stop_exc && (exc_fn || exc)));
  assign ce       = running && (phase == 2'd3);
  assign agu_load = go;
  assign busy     = (state != S_IDLE);
  assign alu_run  = running && mask[GRP_ALU];

  // Read address of the configuration memory.
  always_comb begin
    cfg_raddr = pc + AW'(fa);
    if (state == S_PRIME || state == S_RUN) cfg_raddr = sptr;
  end

  // ALU instruction fetch: the word read in cycle t is executed in t+1.
  always_comb begin
    alu_pc_n = alu_pc;
    if (go) alu_pc_n = alu_base;
    else if (state == S_RUN)
      alu_pc_n = (alu_pc == alu_base + AW'(alu_len) - AW'(1)) ? alu_base : alu_pc + AW'(1);
  end
  assign alu_raddr = alu_pc_n;
  assign alu_instr[0] = alu_run ? alu_instr_t'(alu_rdata[13:0])  : '0;
  assign alu_instr[1] = alu_run ? alu_instr_t'(alu_rdata[27:14]) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= '0;
      pc <= '0; sptr <= '0; next_pc <= '0;
      for (int i = 0; i < INSTR_WORDS; i++) iw[i] <= '0;
      fa <= '0; rd_pend <= 1'b0; rd_idx <= '0;
      sbuf <= '0; slevel <= '0; cnt <= '0; mask <= '0;
      stop_exc <= 1'b0; exc_fn <= 1'b0; armed <= 1'b0;
      alu_pc <= '0; alu_base <= '0; alu_len <= '0;
      stage_cfg <= '0; hard <= '0; soft_bits <= '0;
      running <= 1'b0; done <= 1'b0; exc_seen <= 1'b0;
      n_functions <= '0;
    end else begin
      phase  <= phase + 2'd1;
      alu_pc <= alu_pc_n;
      if (running && exc) begin
        exc_seen <= 1'b1;
        exc_fn   <= 1'b1;
      end

      // Arriving configuration words.
      rd_pend <= 1'b0;
      if (rd_pend) begin
        if (rd_idx == 5'd31) begin
          sbuf   <= sbuf | ({32'b0, cfg_rdata} << slevel);
          slevel <= slevel + 7'd32;
        end else begin
          iw[4'(rd_idx)] <= cfg_rdata;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            pc <= '0; fa <= '0; done <= 1'b0; exc_seen <= 1'b0;
            n_functions <= '0;
            state <= S_FETCH;
          end
        end

        S_FETCH: begin
          if (32'(fa) < INSTR_WORDS) begin
            rd_pend <= 1'b1;
            rd_idx  <= fa;
            fa      <= fa + 5'd1;
          end else if (!rd_pend) begin
            state <= S_DECODE;
          end
        end

        S_DECODE: begin
          fa <= '0;
          if (iw[0][31:30] != 2'd1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            mask      <= iw[0][28:23];
            stop_exc  <= iw[0][29];
            cnt       <= iw[0][15:0];
            alu_base  <= iw[1][10:0];
            alu_len   <= iw[1][18:11];
            stage_cfg <= hard_cfg_t'(iw_flat[HDR_WORDS*32 +: HARD_BITS]);
            sptr    <= pc + AW'(INSTR_WORDS);
            next_pc <= pc + AW'(INSTR_WORDS) + AW'(stream_words);
            sbuf    <= '0;
            slevel  <= '0;
            exc_fn  <= 1'b0;
            armed   <= 1'b0;
            state   <= S_PRIME;
          end
        end

        S_PRIME: begin
          // Two words of the soft stream before the function starts.
          if (slevel + (rd_pend ? 7'd32 : 7'd0) < 7'd64) begin
            rd_pend <= 1'b1;
            rd_idx  <= 5'd31;
            sptr    <= sptr + AW'(1);
          end else if (!rd_pend) begin
            state <= S_WAIT;
          end
        end

        S_WAIT: begin
          if (phase == 2'd2) begin
            hard  <= stage_cfg;
            armed <= 1'b1;
          end
          if (go) begin
            soft_bits    <= soft_take(mask, sbuf);
            sbuf    <= sbuf >> sw;
            slevel  <= slevel - 7'(sw);
            running <= 1'b1;
            n_functions <= n_functions + 16'd1;
            state   <= S_RUN;
          end
        end

        S_RUN: begin
          if ((phase == 2'd0 || phase == 2'd1) && !rd_pend && slevel <= 7'd32) begin
            rd_pend <= 1'b1;
            rd_idx  <= 5'd31;
            sptr    <= sptr + AW'(1);
          end
          if (phase == 2'd3) begin
            soft_bits   <= soft_take(mask, sbuf);
            sbuf   <= sbuf >> sw;
            slevel <= slevel - 7'(sw);
            cnt    <= cnt - 16'd1;
            if (last) begin
              running <= 1'b0;
              pc      <= next_pc;
              fa      <= '0;
              state   <= S_FETCH;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
