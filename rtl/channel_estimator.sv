// Two-stage scattered-pilot synchronisation control with pilot pre-filling,
// and predictive 2-D channel estimation on the shared memory bank.
//
// Pilot store. After the symbol boundary is found the fourteen 1K x 12 SRAM
// modules become seven groups (group g = modules 2g / 2g+1 for real /
// imaginary). A group holds the scattered pilots of one symbol, pilot of
// carrier k at address floor(k/12), multiplied by its reference sign so that
// the stored value is the channel times 4/3. A table maps symbol age 1..7
// (1 = previous symbol) to a group.
//
// Two-stage SPS with pre-filling. In the first SPS symbol the pilot mode is
// unknown, so every carrier of all four classes (k mod 12 = 0, 3, 6, 9) is
// written, class q into group q. When the power-based detector reports mode
// m1 for that symbol, group m1 becomes age 1 and the other three are freed;
// the next symbol is predicted to be mode m1+1 and only that class is stored.
// If the detector confirms the prediction on that second symbol the mode is
// locked and counts up by one each symbol; otherwise every stored symbol is
// dropped and the scheme starts again with a pre-fill symbol.
//
// Predictive 2-D estimation. Once ages 1..7 are all valid, for each carrier
// k = 3i of a symbol of mode m: a pilot of this symbol (class m) gives
// CR = 3/4 * s_k * SC; another class q, last seen d = (m-q) mod 4 symbols ago,
// is extrapolated from ages d and d+4 as
// CR = 3/4 * ((4+d)*SC(n-d) - d*SC(n-d-4)) / 4, all in shifts and adds
// (7 = 8-1, 3 = 2+1, 6 = 4+2, 5 = 4+1). Carriers between are linearly
// interpolated: (2a+b)/3 and (a+2b)/3, with 1/3 taken as 341/1024.
//
// Read/write conflict. In steady state the current symbol overwrites the
// group of age 7, which is still needed for class m+1 three carriers later.
// Each pilot write is therefore preceded by a read of the same address (the
// pre-read), held in a register and used in place of the memory for that
// one value. Writes fall on carriers k mod 3 = 1 and reads on k mod 3 = 0, so
// every module sees at most one access per clock.
//
// Following the document: seven pilot groups on the shared SRAMs, Eqn. 5.2,
// the pre-read, linear frequency interpolation, PB-PB two-stage SPS with
// pre-filling and predicted mode = m1+1. This design's own choices: the
// group allocation table, the 3/4 scaling that removes the 4/3 pilot boost,
// the 341/1024 approximation and the pipeline timing.
//
// Interface: carriers k = 0..Kmax arrive on consecutive clocks (first marks
// k = 0), with at least 4 idle clocks between symbols. sps_done/sps_mode come
// from the SPS detector one clock after the last carrier. Outputs are the
// same carriers, 4 clocks later, with the channel estimate; ce_ok tells
// whether the estimate is backed by seven stored symbols.
module channel_estimator
  import dvb_pkg::*;
#(
  parameter int unsigned CRW = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,          // bank handed over to channel estimation
  input  logic                  fc_valid,
  input  logic                  fc_first,
  input  logic                  fc_last,
  input  logic [12:0]           fc_k,
  input  logic signed [11:0]    fc_re,
  input  logic signed [11:0]    fc_im,
  input  logic                  sps_done,
  input  logic [1:0]            sps_mode,
  // memory bank
  output bank_req_t             ce_req [NBANK],
  input  logic [BANK_W-1:0]     rdata  [NBANK],
  // results
  output logic                  out_valid,
  output logic [12:0]           out_k,
  output logic signed [11:0]    out_sc_re,
  output logic signed [11:0]    out_sc_im,
  output logic signed [CRW-1:0] out_cr_re,
  output logic signed [CRW-1:0] out_cr_im,
  output logic                  out_ce_ok,
  output logic                  sps_locked,
  output logic [1:0]            cur_mode,
  // observation
  output logic                  ev_prefill,
  output logic                  ev_mismatch,
  output logic                  ev_preread
);
  typedef enum logic [1:0] {SP_FIRST, SP_SECOND, SP_LOCKED} sp_state_e;
  sp_state_e sp_state;

  logic [2:0] age_grp [1:8];
  logic       age_v   [1:8];
  logic [2:0] wgrp;             // group written by the current symbol
  logic       in_sym;
  logic       ce_on;            // current symbol is estimated
  logic [1:0] pred;

  // ---------------- carrier position ----------------
  logic [3:0] r12_q, r12;       // k mod 12
  logic [9:0] pa_q, pa;         // floor(k/12)
  logic [1:0] q;                // class (k/3) mod 4
  logic       on3;              // k mod 3 == 0
  logic       act;              // carrier processed

  assign act = en && fc_valid && (fc_first || in_sym);
  always_comb begin
    if (fc_first)            begin r12 = 4'd0;           pa = '0;           end
    else if (r12_q == 4'd11) begin r12 = 4'd0;           pa = pa_q + 10'd1; end
    else                     begin r12 = r12_q + 4'd1;   pa = pa_q;         end
    on3 = (r12 % 4'd3) == 4'd0;
    q   = 2'(r12 / 4'd3);
  end

  logic w;
  pilot_prbs u_prbs (.clk, .rst_n, .first(fc_first), .adv(act), .w);

  // ---------------- free group search ----------------
  logic [6:0] used;
  logic [2:0] free_grp;
  logic       have_free;
  always_comb begin
    used = '0;
    for (int d = 1; d <= 7; d++) if (age_v[d]) used[age_grp[d]] = 1'b1;
    free_grp  = age_grp[7];
    have_free = 1'b0;
    for (int g = 6; g >= 0; g--) if (!used[g]) begin free_grp = 3'(g); have_free = 1'b1; end
  end

  logic all_valid;
  always_comb begin
    all_valid = 1'b1;
    for (int d = 1; d <= 7; d++) all_valid &= age_v[d];
  end

  // ---------------- per-carrier decisions (cycle t) ----------------
  logic        prefill_sym;
  logic        is_pil;
  logic [1:0]  dd;               // symbols since class q was a pilot
  logic [2:0]  grp_a, grp_b, grp_w_now;
  logic        b_from_pre;
  logic        ce_on_now;
  logic [1:0]  m_now;
  logic signed [11:0] ps_re, ps_im;

  assign prefill_sym = (sp_state == SP_FIRST);
  assign ce_on_now   = fc_first ? (sp_state == SP_LOCKED && all_valid) : ce_on;
  assign m_now       = cur_mode;
  assign grp_w_now   = fc_first ? (have_free ? free_grp : age_grp[7]) : wgrp;

  always_comb begin
    is_pil     = on3 && (prefill_sym || q == m_now);
    dd         = 2'(m_now - q);
    grp_a      = age_grp[(dd == 2'd0) ? 3'd1 : {1'b0, dd}];   // dd = 0 only on own pilots
    grp_b      = age_grp[(dd == 2'd0) ? 3'd5 : {1'b0, dd} + 3'd4];
    b_from_pre = (grp_b == grp_w_now) && (q > m_now);
    ps_re      = w ? -fc_re : fc_re;
    ps_im      = w ? -fc_im : fc_im;
  end

  // requests of this cycle: pre-read before a pilot write, or the two reads
  // for an extrapolated carrier; plus the registered write of the previous
  // pilot
  logic        wr_pend;
  logic [2:0]  wr_grp;
  logic [9:0]  wr_addr;
  logic [11:0] wr_re, wr_im;

  always_comb begin
    for (int b = 0; b < NBANK; b++) ce_req[b] = BANK_IDLE;
    if (wr_pend) begin
      ce_req[2*wr_grp]   = '{en: 1'b1, we: 1'b1, addr: wr_addr, wdata: wr_re};
      ce_req[2*wr_grp+1] = '{en: 1'b1, we: 1'b1, addr: wr_addr, wdata: wr_im};
    end
    if (act && ce_on_now && on3) begin
      if (is_pil) begin
        ce_req[2*grp_w_now]   = '{en: 1'b1, we: 1'b0, addr: pa, wdata: '0};
        ce_req[2*grp_w_now+1] = '{en: 1'b1, we: 1'b0, addr: pa, wdata: '0};
      end else begin
        ce_req[2*grp_a]   = '{en: 1'b1, we: 1'b0, addr: pa, wdata: '0};
        ce_req[2*grp_a+1] = '{en: 1'b1, we: 1'b0, addr: pa, wdata: '0};
        if (!b_from_pre) begin
          ce_req[2*grp_b]   = '{en: 1'b1, we: 1'b0, addr: pa, wdata: '0};
          ce_req[2*grp_b+1] = '{en: 1'b1, we: 1'b0, addr: pa, wdata: '0};
        end
      end
    end
  end

  // ---------------- stage t+1 registers ----------------
  logic               s1_v, s1_on3, s1_pil, s1_bpre, s1_pre;
  logic [1:0]         s1_d, s1_q;
  logic [2:0]         s1_ga, s1_gb, s1_gw;
  logic signed [11:0] s1_ps_re, s1_ps_im;
  logic signed [11:0] pre_re, pre_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_on3 <= 1'b0; s1_pil <= 1'b0; s1_bpre <= 1'b0; s1_pre <= 1'b0;
      s1_d <= '0; s1_q <= '0; s1_ga <= '0; s1_gb <= '0; s1_gw <= '0;
      s1_ps_re <= '0; s1_ps_im <= '0; pre_re <= '0; pre_im <= '0;
      wr_pend <= 1'b0; wr_grp <= '0; wr_addr <= '0; wr_re <= '0; wr_im <= '0;
    end else begin
      s1_v     <= act;
      s1_on3   <= on3;
      s1_pil   <= is_pil;
      s1_bpre  <= b_from_pre;
      s1_pre   <= act && ce_on_now && is_pil;
      s1_d     <= dd;
      s1_q     <= q;
      s1_ga    <= grp_a;
      s1_gb    <= grp_b;
      s1_gw    <= grp_w_now;
      s1_ps_re <= ps_re;
      s1_ps_im <= ps_im;
      wr_pend  <= act && is_pil;
      wr_grp   <= prefill_sym ? {1'b0, q} : grp_w_now;
      wr_addr  <= pa;
      wr_re    <= ps_re;
      wr_im    <= ps_im;
      if (s1_pre) begin            // pre-read data of the group about to be overwritten
        pre_re <= rdata[2*s1_gw];
        pre_im <= rdata[2*s1_gw+1];
      end
    end
  end

  // ---------------- black (k mod 3 == 0) channel estimates ----------------
  logic signed [CRW-1:0] blk [4];
  logic signed [CRW-1:0] blk_re, blk_im;
  logic signed [11:0]    a_re, a_im, b_re, b_im;
  logic signed [11:0]    pre_now_re, pre_now_im;

  // the pre-read register is written at the end of the pilot cycle; a read of
  // the neighbouring class comes three carriers later, so it is settled
  assign pre_now_re = pre_re;
  assign pre_now_im = pre_im;

  function automatic logic signed [CRW-1:0] extrap(logic [1:0] d, logic signed [11:0] a,
                                                  logic signed [11:0] b);
    logic signed [16:0] aa, bb, num, x3;
    aa = 17'(a);
    bb = 17'(b);
    case (d)
      2'd1:    num = (aa <<< 2) + aa - bb;                       // 5A - B
      2'd2:    num = (aa <<< 2) + (aa <<< 1) - (bb <<< 1);       // 6A - 2B
      default: num = (aa <<< 3) - aa - (bb <<< 1) - bb;          // 7A - 3B
    endcase
    x3 = (num <<< 1) + num;                                      // * 3
    return CRW'(x3 >>> 4);                                       // / 4 (time) * 3/4 (pilot)
  endfunction

  function automatic logic signed [CRW-1:0] three_q(logic signed [11:0] p);
    logic signed [13:0] pp;
    pp = 14'(p);
    return CRW'(((pp <<< 1) + pp) >>> 2);                        // 3/4 * p
  endfunction

  always_comb begin
    a_re = rdata[2*s1_ga];
    a_im = rdata[2*s1_ga+1];
    b_re = s1_bpre ? pre_now_re : rdata[2*s1_gb];
    b_im = s1_bpre ? pre_now_im : rdata[2*s1_gb+1];
    if (s1_pil) begin
      blk_re = three_q(s1_ps_re);
      blk_im = three_q(s1_ps_im);
    end else begin
      blk_re = extrap(s1_d, a_re, b_re);
      blk_im = extrap(s1_d, a_im, b_im);
    end
  end

  logic signed [CRW-1:0] blk_im_r [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin blk[i] <= '0; blk_im_r[i] <= '0; end
    end else if (s1_v && s1_on3) begin
      blk[s1_q]      <= blk_re;
      blk_im_r[s1_q] <= blk_im;
    end
  end

  // ---------------- delay of the carrier stream, frequency interpolation ----------------
  localparam int unsigned DLY = 4;
  logic               dv   [DLY];
  logic [12:0]        dk   [DLY];
  logic [3:0]         dr12 [DLY];
  logic               dce  [DLY];
  logic signed [11:0] dre  [DLY];
  logic signed [11:0] dim  [DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DLY; i++) begin
        dv[i] <= 1'b0; dk[i] <= '0; dr12[i] <= '0; dce[i] <= 1'b0; dre[i] <= '0; dim[i] <= '0;
      end
    end else begin
      dv[0] <= act; dk[0] <= fc_k; dr12[0] <= r12; dce[0] <= ce_on_now;
      dre[0] <= fc_re; dim[0] <= fc_im;
      for (int i = 1; i < DLY; i++) begin
        dv[i] <= dv[i-1]; dk[i] <= dk[i-1]; dr12[i] <= dr12[i-1]; dce[i] <= dce[i-1];
        dre[i] <= dre[i-1]; dim[i] <= dim[i-1];
      end
    end
  end

  function automatic logic signed [CRW-1:0] third(logic signed [CRW+1:0] x);
    logic signed [CRW+11:0] xx;
    xx = (CRW+12)'(x);
    return CRW'(((xx <<< 8) + (xx <<< 6) + (xx <<< 4) + (xx <<< 2) + xx) >>> 10);
  endfunction

  always_comb begin
    logic [1:0] qi, qn;
    logic [1:0] ph;
    logic signed [CRW+1:0] lo_re, hi_re, lo_im, hi_im;
    qi = 2'(dr12[DLY-1] / 4'd3);
    qn = qi + 2'd1;
    ph = 2'(dr12[DLY-1] % 4'd3);
    lo_re = (CRW+2)'(blk[qi]);      hi_re = (CRW+2)'(blk[qn]);
    lo_im = (CRW+2)'(blk_im_r[qi]); hi_im = (CRW+2)'(blk_im_r[qn]);
    out_valid = dv[DLY-1];
    out_k     = dk[DLY-1];
    out_sc_re = dre[DLY-1];
    out_sc_im = dim[DLY-1];
    out_ce_ok = dce[DLY-1];
    case (ph)
      2'd0: begin out_cr_re = blk[qi]; out_cr_im = blk_im_r[qi]; end
      2'd1: begin out_cr_re = third((lo_re <<< 1) + hi_re); out_cr_im = third((lo_im <<< 1) + hi_im); end
      default: begin out_cr_re = third(lo_re + (hi_re <<< 1)); out_cr_im = third(lo_im + (hi_im <<< 1)); end
    endcase
  end

  // ---------------- symbol-level control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_state <= SP_FIRST; in_sym <= 1'b0; ce_on <= 1'b0; wgrp <= '0; pred <= '0;
      cur_mode <= '0; sps_locked <= 1'b0; r12_q <= '0; pa_q <= '0;
      ev_prefill <= 1'b0; ev_mismatch <= 1'b0; ev_preread <= 1'b0;
      for (int d = 1; d <= 8; d++) begin age_grp[d] <= '0; age_v[d] <= 1'b0; end
    end else begin
      ev_prefill <= 1'b0; ev_mismatch <= 1'b0;
      ev_preread <= act && ce_on_now && on3 && !is_pil && b_from_pre;
      if (act) begin
        r12_q <= r12;
        pa_q  <= pa;
        if (fc_first) begin
          wgrp  <= grp_w_now;
          ce_on <= ce_on_now;
          ev_prefill <= prefill_sym;
        end
        in_sym <= !fc_last;
      end
      if (en && sps_done) begin
        case (sp_state)
          SP_FIRST: begin
            for (int d = 2; d <= 8; d++) age_v[d] <= 1'b0;
            age_v[1]   <= 1'b1;
            age_grp[1] <= {1'b0, sps_mode};
            pred       <= sps_mode + 2'd1;
            cur_mode   <= sps_mode + 2'd1;
            sp_state   <= SP_SECOND;
          end
          SP_SECOND: begin
            if (sps_mode == pred) begin
              for (int d = 2; d <= 8; d++) begin age_v[d] <= age_v[d-1]; age_grp[d] <= age_grp[d-1]; end
              age_v[1]   <= 1'b1;
              age_grp[1] <= wgrp;
              cur_mode   <= pred + 2'd1;
              sps_locked <= 1'b1;
              sp_state   <= SP_LOCKED;
            end else begin
              for (int d = 1; d <= 8; d++) age_v[d] <= 1'b0;
              ev_mismatch <= 1'b1;
              sp_state    <= SP_FIRST;
            end
          end
          default: begin
            for (int d = 2; d <= 8; d++) begin age_v[d] <= age_v[d-1]; age_grp[d] <= age_grp[d-1]; end
            age_v[1]   <= 1'b1;
            age_grp[1] <= wgrp;
            cur_mode   <= cur_mode + 2'd1;
          end
        endcase
      end
    end
  end

  // carriers of a symbol must be back to back
  a_burst: assert property (@(posedge clk) disable iff (!rst_n)
    (act && !fc_last) |=> fc_valid);
endmodule
