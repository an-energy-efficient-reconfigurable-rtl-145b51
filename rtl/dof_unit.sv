// dof_unit: degree-of-freedom (DOF) configurable unit, "Architecture II".
//
// One complex datapath covers FIR filtering, auto/cross-correlation,
// matrix-vector products, de-spreading, Euclidean distance and the radix
// butterfly of a decimation-in-time FFT. Per slow cycle (ce high):
//
//   p    = x0 * COP1(x1)                  complex product, 32-bit parts
//   a    = acc ? A : (COP2(x2) <<< x2_shift)
//   sum  = a + (COPp(p) >>> 5)            27-bit accumulator adder
//   A   <= sum                            the accumulator register
//   z2  <= sat16(sum >>> shift)           shifter output
//   z1  <= sat16((sum >>> shift) + COP3(x3))
//   z3  <= sat16(p >>> 15)                product in Q15 scaling
//
// The structure (COPs on x1, x2, x3 and on the product, one complex
// multiplier, the 2:1 multiplexer in front of the accumulator adder, the
// shifter tapping the adder output, the final adder with COP(x3), and the
// widths 16/32/27) follows the description. The register holding the sum is
// the only pipeline stage, so every input reaches every output one slow
// cycle later: the outputs are registered together with the accumulator.
// Own choices: the 32-bit product enters the 27-bit adder with its five
// least significant bits dropped; x2 is sign-extended and left-aligned by a
// programmable amount; outputs saturate to 16 bits; reset clears the
// registers. Hard control: dof_hard_t (21 bits). Soft control: acc (1 bit),
// 0 = load the x2 path, 1 = accumulate.
module dof_unit
  import bb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,        // slow-cycle enable
  input  dof_hard_t hard,
  input  logic      acc,       // soft control bit
  input  cplx_t     x0,
  input  cplx_t     x1,
  input  cplx_t     x2,
  input  cplx_t     x3,
  output cplx_t     z1,
  output cplx_t     z2,
  output cplx_t     z3
);
  logic signed [DW-1:0]     x1c_re, x1c_im, x2c_re, x2c_im, x3c_re, x3c_im;
  logic signed [DOF_PW-1:0] p_re, p_im, pc_re, pc_im;
  logic signed [DOF_AW-1:0] a_re, a_im, sum_re, sum_im, acc_re, acc_im;
  logic signed [DOF_AW-1:0] sh_re, sh_im;

  cop #(.W(DW)) u_cop1 (.sel(hard.cop_x1), .in_re(x1.re), .in_im(x1.im), .out_re(x1c_re), .out_im(x1c_im));
  cop #(.W(DW)) u_cop2 (.sel(hard.cop_x2), .in_re(x2.re), .in_im(x2.im), .out_re(x2c_re), .out_im(x2c_im));
  cop #(.W(DW)) u_cop3 (.sel(hard.cop_x3), .in_re(x3.re), .in_im(x3.im), .out_re(x3c_re), .out_im(x3c_im));

  // Complex multiplier: four real multipliers and two adders.
  logic signed [2*DW-1:0] m_rr, m_ii, m_ri, m_ir;
  always_comb begin
    m_rr = x0.re * x1c_re;
    m_ii = x0.im * x1c_im;
    m_ri = x0.re * x1c_im;
    m_ir = x0.im * x1c_re;
    p_re = m_rr - m_ii;
    p_im = m_ri + m_ir;
  end

  cop #(.W(DOF_PW)) u_copp (.sel(hard.cop_p), .in_re(p_re), .in_im(p_im), .out_re(pc_re), .out_im(pc_im));

  always_comb begin
    logic signed [DOF_AW-1:0] x2e_re, x2e_im;
    x2e_re = DOF_AW'(x2c_re) <<< hard.x2_shift;
    x2e_im = DOF_AW'(x2c_im) <<< hard.x2_shift;
    a_re   = acc ? acc_re : x2e_re;
    a_im   = acc ? acc_im : x2e_im;
    sum_re = a_re + DOF_AW'(pc_re >>> (DOF_PW - DOF_AW));
    sum_im = a_im + DOF_AW'(pc_im >>> (DOF_PW - DOF_AW));
    sh_re  = sum_re >>> hard.shift;
    sh_im  = sum_im >>> hard.shift;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0; acc_im <= '0;
      z1 <= '0; z2 <= '0; z3 <= '0;
    end else if (ce) begin
      acc_re <= sum_re;
      acc_im <= sum_im;
      z2.re  <= sat16(48'(sh_re));
      z2.im  <= sat16(48'(sh_im));
      z1.re  <= sat16(48'(sh_re) + 48'(x3c_re));
      z1.im  <= sat16(48'(sh_im) + 48'(x3c_im));
      z3.re  <= sat16(48'(p_re >>> 15));
      z3.im  <= sat16(48'(p_im >>> 15));
    end
  end
endmodule
