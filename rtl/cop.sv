// cop: the complex operator "COP" of the DOF unit.
//
// For an input x = a + jb the output is one of x, -x, jx, -jx, jx* or -jx*,
// chosen by a 3-bit control field (bb_pkg::cop_e). These six choices are the
// ones the DOF unit is specified with; they cover the +/-/j/-j rotation used
// for de-spreading and FFT butterflies, and together with a second COP on
// the product they give the conjugate needed for correlation
// (x0 * conj(x1) = -j * (x0 * (j x1*))). Only sign changes and a swap of the
// real and imaginary parts are needed: it is pure combinational logic. Codes
// 6 and 7 are unused and pass x unchanged (own choice). Negating the most
// negative value wraps, as two's complement negation does.
module cop #(
  parameter int unsigned W = 16
) (
  input  logic [2:0]          sel,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  import bb_pkg::*;

  always_comb begin
    unique case (sel)
      COP_NEG: begin out_re = -in_re; out_im = -in_im; end  // -(a+jb)
      COP_J:   begin out_re = -in_im; out_im =  in_re; end  //  j(a+jb) = -b + ja
      COP_NJ:  begin out_re =  in_im; out_im = -in_re; end  // -j(a+jb) =  b - ja
      COP_JC:  begin out_re =  in_im; out_im =  in_re; end  //  j(a-jb) =  b + ja
      COP_NJC: begin out_re = -in_im; out_im = -in_re; end  // -j(a-jb) = -b - ja
      default: begin out_re =  in_re; out_im =  in_im; end  //  a + jb
    endcase
  end
endmodule
