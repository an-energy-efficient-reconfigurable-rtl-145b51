// cordic_unit: CORDIC configurable unit (spatially unrolled, 10 stages).
//
// Rotation mode (cordic_vec = 0, polar to rectangular) rotates the vector
// (x, y) by the angle z: sine and cosine are obtained with x = 1/K, y = 0.
// Vectoring mode (cordic_vec = 1, rectangular to polar) drives y to zero and
// returns the magnitude K*|x + jy| in x and the phase in z, the two numbers a
// normalisation needs. K = prod sqrt(1 + 2^-2i), i = 0..9, is about 1.6468
// and is not compensated.
//
// Following the chosen design point: N = 10 stages connected one after
// another, all working in one slow cycle, with 12-bit adders and shifters in
// each stage; the result is registered, giving a latency of one slow cycle.
// Own choices: inputs x, y are Q1.15 and enter the stages as in >>> 5
// (1.0 = 1024); outputs x, y are the 12-bit stage values <<< 4, i.e. Q2.14
// (1.0 = 16384), which leaves room for the gain K; their four lowest bits
// are therefore always zero. Angles are 16-bit binary
// angles (pi = 2^15) in and out, 12-bit inside (pi = 2^11). A first
// +/-pi step (negate x and y) brings any input angle or any input vector into
// the range where the ten micro-rotations converge. The input magnitude
// |x + jy| must stay below about 1.2 so that K*|x+jy| fits the 12-bit stages.
//
// Arctangent table: ATAN[i] = round(atan(2^-i) * 2048 / pi).
module cordic_unit
  import bb_pkg::*;
#(
  parameter int unsigned STAGES = 10,
  parameter int unsigned SW     = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,          // slow-cycle enable
  input  logic  vec,         // hard control: 0 rotation, 1 vectoring
  input  cplx_t in_xy,       // x + jy
  input  logic signed [DW-1:0] in_z,   // angle, pi = 2^15
  output cplx_t out_xy,
  output logic signed [DW-1:0] out_z
);
  localparam int unsigned XSH = DW - SW + 1;   // 5: input scaling
  localparam int unsigned OSH = DW - SW;       // 4: output scaling
  localparam int unsigned ZSH = DW - SW;       // 4: angle scaling

  function automatic logic signed [SW-1:0] atan_tab(input int unsigned i);
    case (i)
      0: return 12'sd512;  1: return 12'sd302;  2: return 12'sd160;
      3: return 12'sd81;   4: return 12'sd41;   5: return 12'sd20;
      6: return 12'sd10;   7: return 12'sd5;    8: return 12'sd3;
      9: return 12'sd1;    default: return 12'sd0;
    endcase
  endfunction

  logic signed [SW-1:0] xs [STAGES+1];
  logic signed [SW-1:0] ys [STAGES+1];
  logic signed [SW-1:0] zs [STAGES+1];

  // Pre-rotation by pi where needed, then the micro-rotation stages.
  always_comb begin
    logic signed [SW-1:0] x0, y0, z0;
    x0 = SW'(in_xy.re >>> XSH);
    y0 = SW'(in_xy.im >>> XSH);
    z0 = SW'(in_z >>> ZSH);
    if (!vec) begin
      // |z| > pi/2: rotate by pi first (z - pi wraps in binary angle).
      if (z0[SW-1] != z0[SW-2]) begin
        xs[0] = -x0; ys[0] = -y0; zs[0] = {~z0[SW-1], z0[SW-2:0]};
      end else begin
        xs[0] = x0;  ys[0] = y0;  zs[0] = z0;
      end
    end else begin
      // x < 0: negate the vector and start the phase at pi.
      if (x0[SW-1]) begin
        xs[0] = -x0; ys[0] = -y0; zs[0] = {1'b1, {(SW-1){1'b0}}};
      end else begin
        xs[0] = x0;  ys[0] = y0;  zs[0] = '0;
      end
    end
    for (int i = 0; i < STAGES; i++) begin
      logic d;   // 1: rotate clockwise
      d = vec ? !ys[i][SW-1] : zs[i][SW-1];
      if (d) begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
        zs[i+1] = zs[i] + atan_tab(i);
      end else begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
        zs[i+1] = zs[i] - atan_tab(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_xy <= '0;
      out_z  <= '0;
    end else if (ce) begin
      out_xy.re <= DW'(xs[STAGES]) <<< OSH;
      out_xy.im <= DW'(ys[STAGES]) <<< OSH;
      out_z     <= DW'(zs[STAGES]) <<< ZSH;
    end
  end
endmodule
