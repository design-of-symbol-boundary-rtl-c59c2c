// Self-checking test of blind mode / GI / boundary detection.
// The stimulus is an OFDM-like stream built here: each symbol is N random
// 6-bit complex samples (uniform, +-12) preceded by a copy of its last G
// samples, with +-1 noise added, starting at a random phase. For each case
// (2K 1/4, 4K 1/32, 8K 1/8, 2K 1/16) the detector must report the mode and
// guard interval, and sym_start must fall on the sample GI/2 before the
// useful part of a symbol (within +-TOL samples) and then repeat every
// N+G samples. A first case feeds noise with no cyclic prefix, which must
// make the detector give up on 8K and start over at 2K without locking.
// The lock time is checked against the worst case of the sequential scheme.
module tb_css_detector;
  import dvb_pkg::*;
  localparam int TOL = 4;
  logic clk = 0, rst_n = 0, r_valid = 0;
  logic signed [5:0] r_re = 0, r_im = 0;
  bank_req_t css_req [NBANK];
  bank_req_t ce_req  [NBANK];
  logic [BANK_W-1:0] rdata [NBANK];
  tx_mode_e mode;
  gi_e gi;
  logic locked, sym_start, thr, ev_mode_switch, ev_gi_found, ev_restart;
  int checks = 0, failures = 0;
  int n_switch = 0, n_gi = 0, n_restart = 0;

  always_comb for (int b = 0; b < NBANK; b++) ce_req[b] = BANK_IDLE;
  memory_bank u_bank (.clk, .own_ce(1'b0), .css_req, .ce_req, .rdata);
  // the detector's multipliers live in the shared unit, in its time-domain setting
  logic signed [5:0]  mb_re, mb_im;
  logic signed [13:0] mc_re, mc_im;
  logic signed [10:0] sq_re, sq_im;
  logic [21:0]        sq_mc2;
  logic [11:0]        pw;
  shared_mults u_mult (.sel(1'b0),
    .cd_a_re(r_re), .cd_a_im(r_im), .cd_b_re(mb_re), .cd_b_im(mb_im), .cd_c_re(mc_re), .cd_c_im(mc_im),
    .cd_s_re(sq_re), .cd_s_im(sq_im), .cd_mc2(sq_mc2), .cd_r_re(r_re), .cd_r_im(r_im), .cd_pw(pw),
    .sp_x_re('0), .sp_x_im('0), .sp_pw(),
    .dm_sc_re('0), .dm_sc_im('0), .dm_cr_re('0), .dm_cr_im('0), .dm_f1_re(), .dm_f1_im(), .dm_f2());
  css_detector dut (.clk, .rst_n, .r_valid, .r_re, .r_im, .css_req, .rdata, .mode, .gi,
                    .locked, .sym_start,
                    .mul_b_re(mb_re), .mul_b_im(mb_im),
                    .mul_c_re(mc_re), .mul_c_im(mc_im), .sq_re, .sq_im, .sq_mc2,
                    .pw_in(pw),
                    .thr, .ev_mode_switch, .ev_gi_found, .ev_restart);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (ev_mode_switch) n_switch++;
    if (ev_gi_found) n_gi++;
    if (ev_restart) n_restart++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [5:0] sym_re [8192];
  logic signed [5:0] sym_im [8192];

  function automatic logic signed [5:0] noisy(logic signed [5:0] v);
    return v + 6'($signed(($urandom % 3)) - 1);
  endfunction

  task automatic run_case(int log2n, int gsh, tx_mode_e em, gi_e eg);
    int n, g, sl, off, i, pos, first_pulse, last_pulse, pulses, t_lock;
    n = 1 << log2n; g = n >> gsh; sl = n + g;
    off = $urandom % sl;
    rst_n = 0; r_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    i = 0; pulses = 0; first_pulse = -1; last_pulse = -1; t_lock = -1;
    while (pulses < 6 && i < 200000) begin
      pos = (i + off) % sl;
      if (pos == 0 || i == 0) begin
        for (int j = 0; j < n; j++) begin
          sym_re[j] = 6'($signed($urandom % 25) - 12);
          sym_im[j] = 6'($signed($urandom % 25) - 12);
        end
      end
      if (pos < g) begin r_re = noisy(sym_re[n - g + pos]); r_im = noisy(sym_im[n - g + pos]); end
      else         begin r_re = noisy(sym_re[pos - g]);     r_im = noisy(sym_im[pos - g]); end
      r_valid = 1;
      #1;
      if (sym_start) begin
        int err;
        err = pos - g / 2;
        if (pulses == 0) begin
          first_pulse = i; t_lock = i;
          checks++;
          if (err > TOL || err < -TOL) begin
            failures++; $display("N=%0d G=%0d: first boundary off by %0d", n, g, err);
          end
        end else begin
          checks++;
          if (i - last_pulse != sl) begin failures++; $display("pulse spacing %0d exp %0d", i - last_pulse, sl); end
        end
        last_pulse = i;
        pulses++;
      end
      @(posedge clk); #1;
      i++;
    end
    r_valid = 0;
    checks++; if (pulses < 6) begin failures++; $display("N=%0d G=%0d: no lock", n, g); end
    checks++; if (mode != em) begin failures++; $display("N=%0d: mode %0d", n, mode); end
    checks++; if (gi != eg) begin failures++; $display("N=%0d G=%0d: gi %0d exp %0d", n, g, gi, eg); end
    // worst case: 2K fill + per tested mode (refill + detection period) + GI + boundary + first pulse
    checks++;
    if (t_lock > 2048 + 3 * (8192 + 2048 + 300) + 2 * (8192 + 2048) + 200) begin
      failures++; $display("N=%0d: lock took %0d samples", n, t_lock);
    end
    $display("case N=%0d G=%0d: locked after %0d samples, offset %0d", n, g, t_lock, off);
  endtask

  initial begin
    // no cyclic prefix at all: must cycle through 2K, 4K, 8K and start over
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      r_re = 6'($signed($urandom % 25) - 12); r_im = 6'($signed($urandom % 25) - 12); r_valid = 1;
      @(posedge clk); #1;
    end
    checks++; if (n_restart == 0) begin failures++; $display("no restart on noise"); end
    checks++; if (locked) begin failures++; $display("locked on noise"); end
    run_case(11, 2, MODE_2K, GI_1_4);
    run_case(12, 5, MODE_4K, GI_1_32);
    run_case(13, 3, MODE_8K, GI_1_8);
    run_case(11, 4, MODE_2K, GI_1_16);
    checks++; if (n_switch < 4) begin failures++; $display("mode switches %0d", n_switch); end
    checks++; if (n_gi < 4) begin failures++; $display("gi decisions %0d", n_gi); end
    $display("mode switches %0d, gi decisions %0d, restarts %0d", n_switch, n_gi, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
