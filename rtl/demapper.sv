// Division-free channel compensation embedded in a three-stage hard demapper.
// Interface: f1_re/f1_im/f2 with in_valid, one carrier per clock; y with
// out_valid 3 clocks later.
// Instead of dividing a carrier SC by its channel estimate CR, stage 1 uses
// F1 = SC * conj(CR) and F2 = |CR|^2, so the equalised point is F1 / F2 and
// every decision |F1| > B*NF * F2 needs only a constant scaling of F2. The
// products come from the multipliers of the boundary detector, which are
// free once the boundary is found (shared_mults): the three-multiplier
// complex multiplier gives F1 and the power squarer F2, combinationally from
// the SC / CR on the same clock, and stage 1 registers them. Real and imaginary
// parts are demapped separately:
//   stage 1: y0 / y1 = sign of Re / Im F1 (1 if negative)          all modes
//   stage 2: y2 / y3 = 0 if |F1| > (alpha+1 or alpha+3)*NF*F2      16/64-QAM
//   stage 3: y4 / y5 against (B+1)*NF*F2 when y2/y3 = 0 (outer
//            pair), (B-1)*NF*F2 when 1 (inner pair)                64-QAM
// B*NF is a 5-bit fraction R/32 (R = 20/21/22 for stage 2; 10/12/15 and
// 30/29/28 for stage 3, for alpha = 1/2/4), applied as shifts and adds in
// canonic signed digit form; the test is 32*|F1| > R*F2. Stages 2 and 3 are
// held (not clocked in) when the constellation does not use them, so before
// the constellation is known the demapper runs as QPSK.
// Following the document: the F1/F2 formulation, stage 1 on the shared
// multipliers, the stage sequence and decision rules, the 5-bit B*NF values. This design's own choices: word
// widths, one pipeline register per stage (latency 3 clocks) and bit order
// y[i] = y_i of EN 300 744.
module demapper
  import dvb_pkg::*;
#(
  parameter int unsigned SCW = 12,
  parameter int unsigned CRW = 14,
  localparam int unsigned FW = SCW + CRW + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [FW-1:0]  f1_re,     // Re SC * conj(CR), from shared_mults
  input  logic signed [FW-1:0]  f1_im,     // Im SC * conj(CR)
  input  logic [2*CRW-1:0]      f2,        // |CR|^2
  input  const_e                cmode,
  input  logic [1:0]            alpha,     // 0: alpha 1, 1: alpha 2, 2: alpha 4
  output logic                  out_valid,
  output logic [5:0]            y
);
  // ---------------- stage 1: signs of F1, magnitudes of F1, F2 ----------------
  logic        [FW-1:0] s1_are, s1_aim, s1_f2;
  logic                 s1_v, s1_y0, s1_y1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_y0 <= 1'b0; s1_y1 <= 1'b0; s1_are <= '0; s1_aim <= '0; s1_f2 <= '0;
    end else begin
      s1_v   <= in_valid;
      s1_y0  <= f1_re < 0;
      s1_y1  <= f1_im < 0;
      s1_are <= (f1_re < 0) ? FW'(-f1_re) : FW'(f1_re);
      s1_aim <= (f1_im < 0) ? FW'(-f1_im) : FW'(f1_im);
      s1_f2  <= FW'(f2);
    end
  end

  // R * F2 as shifts and adds (CSD digits)
  function automatic logic [FW+5:0] scale(logic [4:0] r, logic [FW-1:0] v);
    logic [FW+5:0] x;
    x = (FW+6)'(v);
    case (r)
      5'd10:   return (x << 3) + (x << 1);             // 8 + 2
      5'd12:   return (x << 4) - (x << 2);             // 16 - 4
      5'd15:   return (x << 4) - x;                    // 16 - 1
      5'd20:   return (x << 4) + (x << 2);             // 16 + 4
      5'd21:   return (x << 4) + (x << 2) + x;         // 16 + 4 + 1
      5'd22:   return (x << 4) + (x << 2) + (x << 1);  // 16 + 4 + 2
      5'd28:   return (x << 5) - (x << 2);             // 32 - 4
      5'd29:   return (x << 5) - (x << 2) + x;         // 32 - 4 + 1
      5'd30:   return (x << 5) - (x << 1);             // 32 - 2
      default: return '0;
    endcase
  endfunction

  logic [4:0] r2, r3_in, r3_out;
  always_comb begin
    case (alpha)
      2'd1:    begin r2 = 5'd21; r3_in = 5'd12; r3_out = 5'd29; end
      2'd2:    begin r2 = 5'd22; r3_in = 5'd15; r3_out = 5'd28; end
      default: begin r2 = 5'd20; r3_in = 5'd10; r3_out = 5'd30; end
    endcase
  end

  function automatic logic above(logic [FW-1:0] a, logic [4:0] r, logic [FW-1:0] f2v);
    return ((FW+6)'(a) << 5) > scale(r, f2v);
  endfunction

  // ---------------- stage 2 ----------------
  logic          s2_v, s2_y0, s2_y1, s2_y2, s2_y3;
  logic [FW-1:0] s2_are, s2_aim, s2_f2;
  logic          st2_en, st3_en;
  assign st2_en = (cmode == CONST_16QAM) || (cmode == CONST_64QAM);
  assign st3_en = (cmode == CONST_64QAM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_y0 <= 1'b0; s2_y1 <= 1'b0; s2_y2 <= 1'b0; s2_y3 <= 1'b0;
      s2_are <= '0; s2_aim <= '0; s2_f2 <= '0;
    end else begin
      s2_v  <= s1_v;
      s2_y0 <= s1_y0;
      s2_y1 <= s1_y1;
      if (st2_en) begin
        s2_y2  <= !above(s1_are, r2, s1_f2);
        s2_y3  <= !above(s1_aim, r2, s1_f2);
        s2_are <= s1_are;
        s2_aim <= s1_aim;
        s2_f2  <= s1_f2;
      end
    end
  end

  // ---------------- stage 3 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0;
    end else begin
      out_valid <= s2_v;
      y <= {st3_en ? (s2_y3 ? above(s2_aim, r3_in, s2_f2) : !above(s2_aim, r3_out, s2_f2)) : 1'b0,
            st3_en ? (s2_y2 ? above(s2_are, r3_in, s2_f2) : !above(s2_are, r3_out, s2_f2)) : 1'b0,
            st2_en ? s2_y3 : 1'b0,
            st2_en ? s2_y2 : 1'b0,
            s2_y1, s2_y0};
    end
  end
endmodule
