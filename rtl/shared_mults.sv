// Multipliers shared between the time-domain and the frequency-domain halves
// of the receiver. Until the symbol boundary is found (sel = 0) they serve
// the boundary detector; afterwards (sel = 1) the detector is idle and the
// same hardware serves the pilot detector and the demapper's first stage.
//
//   unit       sel = 0 (boundary detection)        sel = 1 (after lock)
//   corr       r(n) * conj(r(n-N))   6 x 6 bits     F1 = SC * conj(CR)  demapper
//   sq_a       MC2 = |C|^2           11-bit sums    |SC|^2              pilot detector
//   sq_b       |r(n)|^2              6-bit samples  F2 = |CR|^2         demapper
//
// corr is the three-multiplier complex multiplier (cmult3); sq_a and sq_b are
// complex squarers, two multipliers and an adder each. Every unit is sized
// for the wider of its two users; the narrow operands are sign-extended and
// the narrow results are the low bits of the product, which always hold them.
// Which unit serves whom follows the document (correlation part for F1, power
// term for F2, square operation for the pilot power); the squarer of P in the
// boundary detector has no second user and stays there. The select is a plain
// multiplexer on the operands. Purely combinational: each client registers
// the result in its own pipeline.
module shared_mults #(
  parameter int unsigned SCW = 12,   // FFT carrier width
  parameter int unsigned CRW = 14,   // channel-estimate width
  parameter int unsigned SQW = 11    // boundary-detector squarer input width
) (
  input  logic                      sel,
  // boundary detector (sel = 0)
  input  logic signed [5:0]         cd_a_re,
  input  logic signed [5:0]         cd_a_im,
  input  logic signed [5:0]         cd_b_re,
  input  logic signed [5:0]         cd_b_im,
  output logic signed [13:0]        cd_c_re,
  output logic signed [13:0]        cd_c_im,
  input  logic signed [SQW-1:0]     cd_s_re,
  input  logic signed [SQW-1:0]     cd_s_im,
  output logic [2*SQW-1:0]          cd_mc2,
  input  logic signed [5:0]         cd_r_re,
  input  logic signed [5:0]         cd_r_im,
  output logic [11:0]               cd_pw,
  // pilot detector (sel = 1)
  input  logic signed [SCW-1:0]     sp_x_re,
  input  logic signed [SCW-1:0]     sp_x_im,
  output logic [2*SCW-1:0]          sp_pw,
  // demapper stage 1 (sel = 1)
  input  logic signed [SCW-1:0]     dm_sc_re,
  input  logic signed [SCW-1:0]     dm_sc_im,
  input  logic signed [CRW-1:0]     dm_cr_re,
  input  logic signed [CRW-1:0]     dm_cr_im,
  output logic signed [SCW+CRW+1:0] dm_f1_re,
  output logic signed [SCW+CRW+1:0] dm_f1_im,
  output logic [2*CRW-1:0]          dm_f2
);
  localparam int unsigned AW = (SCW > 6)   ? SCW : 6;
  localparam int unsigned BW = (CRW > 6)   ? CRW : 6;
  localparam int unsigned XA = (SCW > SQW) ? SCW : SQW;
  localparam int unsigned XB = (CRW > 6)   ? CRW : 6;
  localparam int unsigned PW = AW + BW + 2;

  // ---------------- corr: a * conj(b) ----------------
  logic signed [AW-1:0] a_re, a_im;
  logic signed [BW-1:0] b_re, b_im;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    a_re = sel ? AW'(dm_sc_re) : AW'(cd_a_re);
    a_im = sel ? AW'(dm_sc_im) : AW'(cd_a_im);
    b_re = sel ? BW'(dm_cr_re) : BW'(cd_b_re);
    b_im = sel ? BW'(dm_cr_im) : BW'(cd_b_im);
  end

  cmult3 #(.AW(AW), .BW(BW)) u_corr (
    .a_re, .a_im, .b_re, .b_im, .p_re, .p_im);

  // ---------------- sq_a and sq_b: |x|^2 ----------------
  logic signed [XA-1:0] xa_re, xa_im;
  logic signed [XB-1:0] xb_re, xb_im;
  logic [2*XA-1:0]      pa;
  logic [2*XB-1:0]      pb;

  always_comb begin
    xa_re = sel ? XA'(sp_x_re)  : XA'(cd_s_re);
    xa_im = sel ? XA'(sp_x_im)  : XA'(cd_s_im);
    xb_re = sel ? XB'(dm_cr_re) : XB'(cd_r_re);
    xb_im = sel ? XB'(dm_cr_im) : XB'(cd_r_im);
    pa    = (2*XA)'(xa_re * xa_re) + (2*XA)'(xa_im * xa_im);
    pb    = (2*XB)'(xb_re * xb_re) + (2*XB)'(xb_im * xb_im);
  end

  // ---------------- results, cut to what each user can receive ----------------
  assign cd_c_re  = 14'(p_re);
  assign cd_c_im  = 14'(p_im);
  assign cd_mc2   = (2*SQW)'(pa);
  assign cd_pw    = 12'(pb);
  assign sp_pw    = (2*SCW)'(pa);
  assign dm_f1_re = (SCW+CRW+2)'(p_re);
  assign dm_f1_im = (SCW+CRW+2)'(p_im);
  assign dm_f2    = (2*CRW)'(pb);
endmodule
