// mem_agu: address generation for the data and coefficient memories.
//
// The memories run four fast cycles per slow cycle, so in slow cycle n each
// memory port serves four slots. In slot (phase) p the data memory is read
// at rd_ptr + p, written at wr_ptr + p, and the coefficient memory is read
// at cm_ptr + p. At the end of every slow cycle of a running function each
// pointer advances by its step (0..15); load sets all three pointers to the
// bases of the new function's hard configuration. A step of 1 gives a
// sliding window (four consecutive samples per slow cycle, e.g. the lags of
// a correlation), a step of 4 a plain stream, a step of 0 a fixed buffer.
// The description gives the memory 21 hard-control bits but not their
// meaning; this pointer scheme and its fields (mem_cfg_t) are own choices.
module mem_agu
  import bb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,       // start of a function
  input  logic          adv,        // end of a running slow cycle
  input  logic [1:0]    phase,
  input  mem_cfg_t      cfg,
  output logic [AW-1:0] dm_raddr,
  output logic [AW-1:0] dm_waddr,
  output logic [AW-1:0] cm_raddr
);
  logic [AW-1:0] rd_ptr, wr_ptr, cm_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; cm_ptr <= '0;
    end else if (load) begin
      rd_ptr <= cfg.rd_base;
      wr_ptr <= cfg.wr_base;
      cm_ptr <= cfg.cm_base;
    end else if (adv) begin
      rd_ptr <= rd_ptr + AW'(cfg.rd_step);
      wr_ptr <= wr_ptr + AW'(cfg.wr_step);
      cm_ptr <= cm_ptr + AW'(cfg.cm_step);
    end
  end

  assign dm_raddr = rd_ptr + AW'(phase);
  assign dm_waddr = wr_ptr + AW'(phase);
  assign cm_raddr = cm_ptr + AW'(phase);
endmodule
