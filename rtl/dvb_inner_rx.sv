// DVB-T/H inner-receiver synchronisation and equalisation front end.
//
// Time domain: css_detector finds the transmission mode (2K/4K/8K), the guard
// interval and the symbol boundary from the raw 6-bit samples, and then
// pulses fft_sym_start on the first sample of every FFT window. The FFT
// itself is outside this design: it takes r_re/r_im with fft_sym_start, mode
// and gi, and returns the active carriers k = 0..Kmax on fc_* (fc_first on
// k = 0, carriers back to back, at least 4 idle clocks between symbols).
//
// Frequency domain: sps_detector reports the scattered-pilot mode of each
// symbol by pilot power; channel_estimator runs the two-stage check with
// pilot pre-filling, stores pilots and produces a predictive 2-D channel
// estimate per carrier; demapper equalises without a divider and slices
// the constellation given on cmode/alpha (decoded from TPS outside this
// design) into 2, 4 or 6 bits.
//
// Memory sharing: the fourteen 1K x 12 SRAM modules of memory_bank serve the
// boundary-detection delay-lines until css_locked rises, and the pilot store
// of the channel estimator after it. The multipliers are shared the same way:
// shared_mults serves the boundary detector's correlation, |C|^2 and |r|^2
// until css_locked, then the pilot detector's |SC|^2 and the demapper's F1
// and F2. The sharing of memories and multipliers and the split into these
// blocks follow the document; the port conventions are this design's own.
//
// The blocks' event pulses (mode switch, GI found, pre-fill, mismatch,
// pre-read, restart) and the threshold flag are left unconnected here; they
// exist for observation in simulation.
//
// Outputs: dm_valid/dm_k/dm_bits one carrier per clock, 7 clocks after the
// carrier entered on fc_*; dm_ce_ok flags carriers whose channel estimate is
// backed by seven stored symbols.
module dvb_inner_rx
  import dvb_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // time-domain samples
  input  logic               r_valid,
  input  logic signed [5:0]  r_re,
  input  logic signed [5:0]  r_im,
  // to the FFT
  output logic               fft_sym_start,
  output tx_mode_e           mode,
  output gi_e                gi,
  output logic               css_locked,
  // carriers from the FFT
  input  logic               fc_valid,
  input  logic               fc_first,
  input  logic signed [11:0] fc_re,
  input  logic signed [11:0] fc_im,
  // constellation from the TPS decoder
  input  const_e             cmode,
  input  logic [1:0]         alpha,
  // results
  output logic               sps_locked,
  output logic [1:0]         sp_mode,
  output logic               dm_valid,
  output logic [12:0]        dm_k,
  output logic               dm_ce_ok,
  output logic [5:0]         dm_bits
);
  bank_req_t         css_req [NBANK];
  bank_req_t         ce_req  [NBANK];
  logic [BANK_W-1:0] rdata   [NBANK];

  memory_bank u_bank (.clk, .own_ce(css_locked), .css_req, .ce_req, .rdata);

  logic thr_unused, ev_a, ev_b, ev_c;

  // shared multiplier operands and products
  logic signed [5:0]  cd_b_re, cd_b_im;
  logic signed [13:0] cd_c_re, cd_c_im;
  logic signed [10:0] cd_s_re, cd_s_im;
  logic [21:0]        cd_mc2;
  logic [11:0]        cd_pw;
  logic [23:0]        sp_pw;
  logic signed [27:0] dm_f1_re, dm_f1_im;
  logic [27:0]        dm_f2;

  css_detector u_css (
    .clk, .rst_n, .r_valid, .r_re, .r_im,
    .css_req, .rdata,
    .mode, .gi, .locked(css_locked), .sym_start(fft_sym_start),
    .mul_b_re(cd_b_re), .mul_b_im(cd_b_im),
    .mul_c_re(cd_c_re), .mul_c_im(cd_c_im), .sq_re(cd_s_re), .sq_im(cd_s_im), .sq_mc2(cd_mc2),
    .pw_in(cd_pw),
    .thr(thr_unused),
    .ev_mode_switch(ev_a), .ev_gi_found(ev_b), .ev_restart(ev_c));

  // carrier index
  logic [12:0] k_q, k_cur;
  logic        fc_last;
  assign k_cur   = fc_first ? 13'd0 : k_q + 13'd1;
  assign fc_last = (k_cur == mode_kmax(mode));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        k_q <= '0;
    else if (fc_valid) k_q <= k_cur;
  end

  logic       sps_done;
  logic [1:0] sps_mode;
  sps_detector u_sps (
    .clk, .rst_n, .en(css_locked), .valid(fc_valid), .first(fc_first), .last(fc_last),
    .sc_pw(sp_pw), .done(sps_done), .sp_mode(sps_mode));

  logic               ce_v, ce_ok;
  logic [12:0]        ce_k;
  logic signed [11:0] ce_sc_re, ce_sc_im;
  logic signed [13:0] ce_cr_re, ce_cr_im;
  logic               ev_d, ev_e, ev_f;

  channel_estimator u_ce (
    .clk, .rst_n, .en(css_locked),
    .fc_valid, .fc_first, .fc_last, .fc_k(k_cur), .fc_re, .fc_im,
    .sps_done, .sps_mode,
    .ce_req, .rdata,
    .out_valid(ce_v), .out_k(ce_k), .out_sc_re(ce_sc_re), .out_sc_im(ce_sc_im),
    .out_cr_re(ce_cr_re), .out_cr_im(ce_cr_im), .out_ce_ok(ce_ok),
    .sps_locked, .cur_mode(sp_mode),
    .ev_prefill(ev_d), .ev_mismatch(ev_e), .ev_preread(ev_f));

  // one set of multipliers: boundary detection until lock, then SPS and demapper
  shared_mults u_mult (
    .sel(css_locked),
    .cd_a_re(r_re), .cd_a_im(r_im), .cd_b_re, .cd_b_im, .cd_c_re, .cd_c_im,
    .cd_s_re, .cd_s_im, .cd_mc2, .cd_r_re(r_re), .cd_r_im(r_im), .cd_pw,
    .sp_x_re(fc_re), .sp_x_im(fc_im), .sp_pw,
    .dm_sc_re(ce_sc_re), .dm_sc_im(ce_sc_im), .dm_cr_re(ce_cr_re), .dm_cr_im(ce_cr_im),
    .dm_f1_re, .dm_f1_im, .dm_f2);

  demapper u_dm (
    .clk, .rst_n, .in_valid(ce_v), .f1_re(dm_f1_re), .f1_im(dm_f1_im), .f2(dm_f2),
    .cmode, .alpha,
    .out_valid(dm_valid), .y(dm_bits));

  // carrier index and estimate flag follow the demapper's 3-clock latency
  logic [12:0] k_d [3];
  logic        ok_d [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin k_d[i] <= '0; ok_d[i] <= 1'b0; end
    end else begin
      k_d[0] <= ce_k; ok_d[0] <= ce_ok;
      for (int i = 1; i < 3; i++) begin k_d[i] <= k_d[i-1]; ok_d[i] <= ok_d[i-1]; end
    end
  end
  assign dm_k     = k_d[2];
  assign dm_ce_ok = ok_d[2];
endmodule
