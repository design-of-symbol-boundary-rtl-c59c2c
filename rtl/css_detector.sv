// Blind mode / guard-interval detection and coarse symbol synchronisation
// (symbol boundary detection) for DVB-T/H, on one shared division-free
// datapath.
//
// Datapath. Each received sample r(n) (6-bit I and Q) is written into an 8K
// twister correlation delay-line; the delay-line returns r(n-N) with N the
// mode under test (2K, 4K or 8K). A three-multiplier complex multiplier forms
// c(n) = r(n)*conj(r(n-N)) and a complex squarer forms p(n) = |r(n)|^2; these
// and the |C|^2 squarer sit in shared_mults, outside this module, because the
// frequency-domain blocks reuse them after lock. r(n) reaches them directly,
// r(n-N) leaves on mul_b_*, the squarer bits of C on sq_*, and the products
// return combinationally on mul_c_*, sq_mc2 and pw_in. Both go
// through 2K twister moving-sum delay-lines (complex 24-bit, real 12-bit) of
// reconfigurable length L, and the moving sums C and P are kept in 19-bit
// registers. During the first L samples after a length change the delay-line
// outputs are gated to zero so the sums integrate from scratch. Bits [18:8]
// of C and P feed the squarers: MC2 = |C|^2 and P^2. The normalised
// correlation test |C|/P >= 0.707 is done without a divider as
// 2*MC2 - P^2 >= 0, smoothed by an 8-state confidence counter into the flag
// thr.
//
// Control (sequential mode detection). Fill 2K samples; then for N = 2K, 4K,
// 8K in turn: refill the moving sum with L = N/32 (dummy state) and wait for
// thr low, then watch for up to DET_PERIOD(N) samples for thr to rise. A rise
// fixes the mode; the number of samples thr stays high, plus N/32, is rounded
// down to the nearest allowed guard length (N/32, N/16, N/8, N/4). The moving
// sum is then refilled with L = GI and the maximum MC2 is searched over one
// full symbol (N+GI samples). The boundary is the maximum, referred to the
// delayed sample, moved GI/2 earlier. From then on sym_start pulses once
// every N+GI samples, on the sample that is the first of an FFT window. If
// no mode shows a plateau, detection starts over at 2K. The twister
// delay-line means changing N never needs a refill.
//
// Following the document: the NMC/MC hybrid, the subtractor-for-divider test
// with the 0.5 constant, 6-bit samples, 12-bit SRAM words, 19-bit sums with
// [18:8] squarer inputs, the 2K->4K->8K order, the state sequence and the
// GI/2 boundary offset. This design's own choices: the detection period
// (1+1/4)N, the rounding of the measured plateau to a guard length, the
// confidence-counter rule, the requirement P != 0 for a hit, and the exact
// sample on which sym_start is placed.
//
// Interface: one sample per r_valid; the memory-bank ports (css_req/rdata)
// carry the 14 SRAM accesses. locked rises with the first sym_start.
module css_detector
  import dvb_pkg::*;
#(
  parameter int unsigned ACC_W  = 19,   // moving-sum register width
  parameter int unsigned SQ_LSB = 8     // lowest sum bit fed to the squarers
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               r_valid,
  input  logic signed [5:0]  r_re,
  input  logic signed [5:0]  r_im,
  // memory bank
  output bank_req_t          css_req [NBANK],
  input  logic [BANK_W-1:0]  rdata   [NBANK],
  // results
  output tx_mode_e           mode,
  output gi_e                gi,
  output logic               locked,
  output logic               sym_start,
  // operands to and results from the shared multipliers (shared_mults)
  // (r(n) itself goes to the shared units straight from r_re/r_im)
  output logic signed [5:0]  mul_b_re,        // r(n-N)
  output logic signed [5:0]  mul_b_im,
  input  logic signed [13:0] mul_c_re,        // r(n) * conj(r(n-N))
  input  logic signed [13:0] mul_c_im,
  output logic signed [ACC_W-SQ_LSB-1:0] sq_re,   // bits of C fed to the squarer
  output logic signed [ACC_W-SQ_LSB-1:0] sq_im,
  input  logic [2*(ACC_W-SQ_LSB)-1:0]    sq_mc2,  // |C|^2
  input  logic [11:0]        pw_in,           // |r(n)|^2
  // observation
  output logic               thr,
  output logic               ev_mode_switch,  // pulse: moved to the next test mode
  output logic               ev_gi_found,     // pulse: guard length decided
  output logic               ev_restart       // pulse: no mode found, start over
);
  localparam int unsigned SQW = ACC_W - SQ_LSB;   // 11-bit squarer input

  typedef enum logic [2:0] {
    S_FILL, S_DUMMY, S_MODE_DET, S_GI_DET, S_DUMMY_BND, S_FIND_BND, S_TRACK
  } state_e;

  state_e       state;
  tx_mode_e     tmode;          // mode under test / detected
  logic [13:0]  n_len;          // N
  logic [11:0]  ms_len;         // moving-sum length L
  logic [13:0]  cnt;            // general sample counter of the current state
  logic [11:0]  fill_cnt;       // samples integrated since moving-sum restart
  logic         gate;           // 1 once the moving sum is full
  logic [11:0]  gi_len;
  logic [21:0]  best;
  logic [14:0]  phase;          // samples since the boundary reference
  logic [14:0]  sym_len;        // N + GI

  always_comb begin
    case (tmode)
      MODE_2K: n_len = 14'd2048;
      MODE_4K: n_len = 14'd4096;
      default: n_len = 14'd8192;
    endcase
  end

  // ---------------- delay-lines on the memory bank ----------------
  logic [11:0] corr_dout;
  logic [23:0] msc_din, msc_dout;
  logic [11:0] msp_din, msp_dout;
  bank_req_t   req_corr [8];
  bank_req_t   req_msc  [4];
  bank_req_t   req_msp  [2];
  logic [BANK_W-1:0] rd_corr [8];
  logic [BANK_W-1:0] rd_msc  [4];
  logic [BANK_W-1:0] rd_msp  [2];

  always_comb begin
    for (int b = 0; b < 8; b++) begin css_req[b]    = req_corr[b]; rd_corr[b] = rdata[b];    end
    for (int b = 0; b < 4; b++) begin css_req[8+b]  = req_msc[b];  rd_msc[b]  = rdata[8+b];  end
    for (int b = 0; b < 2; b++) begin css_req[12+b] = req_msp[b];  rd_msp[b]  = rdata[12+b]; end
  end

  twister_delay_line #(.AW(13), .NSL(1)) u_corr_dl (
    .clk, .rst_n, .in_valid(r_valid), .din({r_re, r_im}), .delay(n_len),
    .dout(corr_dout), .req(req_corr), .rdata(rd_corr));

  twister_delay_line #(.AW(11), .NSL(2)) u_msc_dl (
    .clk, .rst_n, .in_valid(r_valid), .din(msc_din), .delay(ms_len),
    .dout(msc_dout), .req(req_msc), .rdata(rd_msc));

  twister_delay_line #(.AW(11), .NSL(1)) u_msp_dl (
    .clk, .rst_n, .in_valid(r_valid), .din(msp_din), .delay(ms_len),
    .dout(msp_dout), .req(req_msp), .rdata(rd_msp));

  // ---------------- correlation and power ----------------
  logic signed [5:0]  d_re, d_im;
  logic signed [13:0] c_re_full, c_im_full;
  logic signed [11:0] c_re, c_im;
  logic [11:0]        pw;

  assign d_re = corr_dout[11:6];
  assign d_im = corr_dout[5:0];

  assign mul_b_re  = d_re;
  assign mul_b_im  = d_im;
  assign c_re_full = mul_c_re;
  assign c_im_full = mul_c_im;

  function automatic logic signed [11:0] sat12(logic signed [13:0] v);
    if (v > 14'sd2047)       return 12'sd2047;
    else if (v < -14'sd2048) return -12'sd2048;
    else                     return v[11:0];
  endfunction

  always_comb begin
    c_re    = sat12(c_re_full);
    c_im    = sat12(c_im_full);
    pw      = pw_in;                            // at most 2048
    msc_din = {c_re, c_im};
    msp_din = pw;
  end

  // ---------------- moving sums ----------------
  logic signed [ACC_W-1:0] s_re, s_im;
  logic        [ACC_W-1:0] s_p;
  logic signed [11:0]      old_re, old_im;
  logic        [11:0]      old_p;
  logic                    ms_restart;

  always_comb begin
    old_re = gate ? msc_dout[23:12] : '0;
    old_im = gate ? msc_dout[11:0]  : '0;
    old_p  = gate ? msp_dout        : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_re <= '0; s_im <= '0; s_p <= '0;
      fill_cnt <= '0; gate <= 1'b0;
    end else if (ms_restart) begin
      s_re <= '0; s_im <= '0; s_p <= '0;
      fill_cnt <= '0; gate <= 1'b0;
    end else if (r_valid) begin
      s_re <= s_re + ACC_W'(c_re) - ACC_W'(old_re);
      s_im <= s_im + ACC_W'(c_im) - ACC_W'(old_im);
      s_p  <= s_p  + ACC_W'(pw)   - ACC_W'(old_p);
      if (!gate) begin
        fill_cnt <= fill_cnt + 12'd1;
        if (fill_cnt + 12'd1 == ms_len) gate <= 1'b1;
      end
    end
  end

  // ---------------- squarers and division-free threshold ----------------
  logic signed [SQW-1:0] q_re, q_im;
  logic        [SQW-1:0] q_p;
  logic        [21:0]    mc2, p2;
  logic                  hit;

  always_comb begin
    q_re = s_re[ACC_W-1:SQ_LSB];
    q_im = s_im[ACC_W-1:SQ_LSB];
    q_p  = s_p[ACC_W-1:SQ_LSB];
    sq_re = q_re;
    sq_im = q_im;
    mc2  = 22'(sq_mc2);
    p2   = 22'(q_p) * 22'(q_p);
    // |C|^2 - 0.5 * P^2 >= 0, scaled by two to keep it in integers
    hit  = ((23'(mc2) << 1) >= 23'(p2)) && (q_p != '0);
  end

  logic cc_en, cc_clr;
  conf_counter u_conf (.clk, .rst_n, .clr(cc_clr), .en(cc_en), .hit, .flag(thr));

  // ---------------- controller ----------------
  function automatic gi_e round_gi(logic [13:0] est, logic [13:0] n);
    // est in samples; u = N/32. Largest allowed guard length not above est.
    logic [13:0] u;
    u = n >> 5;
    if (est < (u << 1))      return GI_1_32;
    else if (est < (u << 2)) return GI_1_16;
    else if (est < (u << 3)) return GI_1_8;
    else                     return GI_1_4;
  endfunction

  function automatic logic [11:0] gi_samples(gi_e g, logic [13:0] n);
    case (g)
      GI_1_32: return 12'(n >> 5);
      GI_1_16: return 12'(n >> 4);
      GI_1_8:  return 12'(n >> 3);
      default: return 12'(n >> 2);
    endcase
  endfunction

  logic [13:0] det_period;
  assign det_period = n_len + (n_len >> 2);

  gi_e gi_next;
  assign gi_next = round_gi(cnt + (n_len >> 5), n_len);

  assign cc_en  = r_valid && gate && (state == S_DUMMY || state == S_MODE_DET || state == S_GI_DET);
  assign mode   = tmode;
  // sym_start marks the sample on r_re/r_im that opens an FFT window
  assign sym_start = r_valid && (state == S_TRACK) && (phase == 15'(gi_len >> 1));

  always_comb begin
    ms_restart = 1'b0;
    cc_clr     = 1'b0;
    if (r_valid) begin
      case (state)
        S_FILL:     if (cnt == 14'd2047) begin ms_restart = 1'b1; cc_clr = 1'b1; end
        S_MODE_DET: if (!thr && cnt == det_period - 14'd1) begin ms_restart = 1'b1; cc_clr = 1'b1; end
        S_GI_DET:   if (!thr) ms_restart = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FILL; tmode <= MODE_2K; ms_len <= 12'd64; cnt <= '0;
      gi <= GI_1_32; gi_len <= 12'd64; best <= '0; phase <= '0; sym_len <= '0;
      locked <= 1'b0;
      ev_mode_switch <= 1'b0; ev_gi_found <= 1'b0; ev_restart <= 1'b0;
    end else begin
      ev_mode_switch <= 1'b0; ev_gi_found <= 1'b0; ev_restart <= 1'b0;
      if (r_valid) begin
        case (state)
          S_FILL: begin                       // fill the correlation delay-line (2K)
            cnt <= cnt + 14'd1;
            if (cnt == 14'd2047) begin
              state <= S_DUMMY; cnt <= '0; ms_len <= 12'(n_len >> 5);
            end
          end
          S_DUMMY: begin                      // refill the moving sum, wait for thr low
            if (gate) begin
              cnt <= cnt + 14'd1;
              if (cnt >= 14'd8 && !thr) begin state <= S_MODE_DET; cnt <= '0; end
            end
          end
          S_MODE_DET: begin
            cnt <= cnt + 14'd1;
            if (thr) begin
              state <= S_GI_DET; cnt <= 14'd1;
            end else if (cnt == det_period - 14'd1) begin
              cnt <= '0;
              state <= S_DUMMY;
              if (tmode == MODE_8K) begin
                tmode <= MODE_2K; ms_len <= 12'd64; ev_restart <= 1'b1;
              end else begin
                tmode  <= (tmode == MODE_2K) ? MODE_4K : MODE_8K;
                ms_len <= (tmode == MODE_2K) ? 12'd128 : 12'd256;
                ev_mode_switch <= 1'b1;
              end
            end
          end
          S_GI_DET: begin                     // measure the plateau length
            if (thr) cnt <= cnt + 14'd1;
            else begin
              gi     <= gi_next;
              gi_len <= gi_samples(gi_next, n_len);
              ms_len <= gi_samples(gi_next, n_len);
              ev_gi_found <= 1'b1;
              state  <= S_DUMMY_BND; cnt <= '0;
            end
          end
          S_DUMMY_BND: begin                  // refill the moving sum with L = GI
            if (gate) begin
              state <= S_FIND_BND; cnt <= '0; best <= '0; phase <= '0;
              sym_len <= 15'(n_len) + 15'(gi_len);
            end
          end
          S_FIND_BND: begin                   // maximum MC2 over one symbol
            cnt <= cnt + 14'd1;
            if (mc2 > best) begin best <= mc2; phase <= 15'd1; end
            else phase <= phase + 15'd1;
            if (15'(cnt) == sym_len - 15'd1) state <= S_TRACK;
          end
          S_TRACK: begin                      // predict successive boundaries
            phase <= (phase == sym_len - 15'd1) ? 15'd0 : phase + 15'd1;
            if (sym_start) locked <= 1'b1;
          end
          default: state <= S_FILL;
        endcase
      end
    end
  end
endmodule
