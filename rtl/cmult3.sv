// Complex multiplier p = a * conj(b) built from three real multipliers and
// five adders/subtractors (the classic Gauss rearrangement), as the document
// uses to shrink the correlation multiplier. With a = ar + j*ai and
// conj(b) = br - j*bi = c + j*d:
//   k1 = c*(ar+ai), k2 = ar*(d-c), k3 = ai*(c+d)
//   re = k1 - k3,   im = k1 + k2
// Purely combinational; the caller registers the result.
module cmult3 #(
  parameter int unsigned AW = 6,
  parameter int unsigned BW = 6,
  localparam int unsigned PW = AW + BW + 2
) (
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] b_re,
  input  logic signed [BW-1:0] b_im,
  output logic signed [PW-1:0] p_re,
  output logic signed [PW-1:0] p_im
);
  logic signed [BW:0]   c, d;
  logic signed [AW:0]   s_a;
  logic signed [BW+1:0] d_m_c, c_p_d;
  logic signed [PW-1:0] k1, k2, k3;

  always_comb begin
    c     = (BW+1)'(b_re);
    d     = -(BW+1)'(b_im);          // imaginary part of conj(b)
    s_a   = (AW+1)'(a_re) + (AW+1)'(a_im);
    d_m_c = (BW+2)'(d) - (BW+2)'(c);
    c_p_d = (BW+2)'(c) + (BW+2)'(d);
    k1    = PW'(c) * PW'(s_a);
    k2    = PW'(a_re) * PW'(d_m_c);
    k3    = PW'(a_im) * PW'(c_p_d);
    p_re  = k1 - k3;
    p_im  = k1 + k2;
  end
endmodule
