// End-to-end test of the inner-receiver front end at its default sizes.
// Time domain: an 8K, GI 1/4 OFDM-like stream (random 6-bit samples with a
// cyclic prefix, +-1 noise, random start phase) drives boundary detection,
// which must step 2K -> 4K -> 8K, find GI 1/4 and emit fft_sym_start on the
// sample GI/2 ahead of each useful part. The FFT is not part of the design:
// on each fft_sym_start this bench emits the carriers of one frequency-domain
// symbol (64-QAM data with boosted scattered pilots through a channel
// linear in time and frequency), as the FFT would. Symbol 1 carries the
// pilot pattern of a wrong symbol, so the first two-stage pilot check fails
// and the scheme starts over. The constellation input stays QPSK (as before
// TPS is decoded) up to symbol 10 and is 64-QAM from symbol 11.
// Checks: mode/GI, boundary position and spacing, memory hand-over, pilot
// lock, estimates valid from symbol 9, demapped bits equal to the sent bits
// (sign bits only while QPSK), and that each mechanism happened: mode
// switch, GI decision, hand-over, pre-fill, mismatch/restart, pre-read,
// QPSK-only and three-stage demapping.
module tb_dvb_inner_rx;
  import dvb_pkg::*;
  localparam int N = 8192, G = 2048, SL = N + G, KMAX = 6816;
  localparam int NSYM = 14;
  localparam int MODE0 = 2;

  logic clk = 0, rst_n = 0, r_valid = 0;
  logic signed [5:0] r_re = 0, r_im = 0;
  logic fft_sym_start, css_locked, sps_locked, dm_valid, dm_ce_ok;
  tx_mode_e mode;
  gi_e gi;
  logic fc_valid = 0, fc_first = 0;
  logic signed [11:0] fc_re = 0, fc_im = 0;
  const_e cmode = CONST_QPSK;
  logic [1:0] alpha = 0;
  logic [1:0] sp_mode;
  logic [12:0] dm_k;
  logic [5:0] dm_bits;
  int checks = 0, failures = 0;

  dvb_inner_rx dut (.clk, .rst_n, .r_valid, .r_re, .r_im, .fft_sym_start, .mode, .gi, .css_locked,
    .fc_valid, .fc_first, .fc_re, .fc_im, .cmode, .alpha, .sps_locked, .sp_mode,
    .dm_valid, .dm_k, .dm_ce_ok, .dm_bits);
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_switch = 0, n_gi = 0, n_prefill = 0, n_mismatch = 0, n_preread = 0, n_handover = 0;
  int n_qpsk = 0, n_64 = 0, n_bits = 0;
  logic own_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_css.ev_mode_switch) n_switch++;
    if (dut.u_css.ev_gi_found) n_gi++;
    if (dut.u_ce.ev_prefill) n_prefill++;
    if (dut.u_ce.ev_mismatch) n_mismatch++;
    if (dut.u_ce.ev_preread) n_preread++;
    if (css_locked && !own_q) n_handover++;
    own_q <= css_locked;
  end

  // ---------------- time-domain stimulus ----------------
  logic signed [5:0] sym_re [N];
  logic signed [5:0] sym_im [N];
  int off;
  int n_pulse = 0, last_pulse = -1;
  int sample = 0;

  initial begin
    off = $urandom % SL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      int pos;
      pos = (sample + off) % SL;
      if (pos == 0 || sample == 0)
        for (int j = 0; j < N; j++) begin
          sym_re[j] = 6'($signed($urandom % 25) - 12);
          sym_im[j] = 6'($signed($urandom % 25) - 12);
        end
      if (pos < G) begin r_re = sym_re[N - G + pos]; r_im = sym_im[N - G + pos]; end
      else         begin r_re = sym_re[pos - G];     r_im = sym_im[pos - G]; end
      r_re = r_re + 6'($signed($urandom % 3) - 1);
      r_im = r_im + 6'($signed($urandom % 3) - 1);
      r_valid = 1;
      #1;
      if (fft_sym_start) begin
        int err;
        err = pos - G / 2;
        checks++;
        if (n_pulse == 0 && (err > 4 || err < -4)) begin
          failures++; $display("boundary off by %0d", err);
        end
        if (n_pulse > 0 && sample - last_pulse != SL) begin
          failures++; $display("boundary spacing %0d", sample - last_pulse);
        end
        if (n_pulse == 0) $display("first boundary at sample %0d (error %0d)", sample, err);
        last_pulse = sample;
        n_pulse++;
      end
      @(posedge clk); #1;
      sample++;
    end
  end

  // ---------------- frequency-domain stimulus (stands in for the FFT) ----------------
  bit w [KMAX+1];
  typedef struct { int n; int k; bit pil; bit [5:0] b; } tag_t;
  tag_t q [$];

  function automatic real lev(bit b0, bit b1, bit b2);
    real m;
    m = b1 ? (b2 ? 3.0 : 1.0) : (b2 ? 5.0 : 7.0);
    return (b0 ? -m : m) / $sqrt(42.0);
  endfunction

  initial begin
    int n;
    for (int i = 0; i <= KMAX; i++) w[i] = (i < 11) ? 1'b1 : w[i-11] ^ w[i-9];
    n = 0;
    while (n < NSYM) begin
      @(posedge clk);
      if (fft_sym_start && css_locked || fft_sym_start && n_pulse > 0) begin
        int m;
        m = (n == 1) ? (MODE0 + 3) % 4 : (MODE0 + n) % 4;
        cmode = (n >= 11) ? CONST_64QAM : CONST_QPSK;
        repeat (8) @(negedge clk);
        for (int k = 0; k <= KMAX; k++) begin
          real xr, xi, hr, hi;
          tag_t t;
          hr = 330.0 + 3.0 * n + 0.005 * k;
          hi = 120.0 - 2.0 * n + 0.004 * k;
          t.n = n; t.k = k; t.b = 6'($urandom);
          t.pil = (k % 12 == 3 * m);
          if (t.pil) begin
            xr = w[k] ? -4.0/3.0 : 4.0/3.0; xi = 0.0;
          end else begin
            xr = lev(t.b[0], t.b[2], t.b[4]); xi = lev(t.b[1], t.b[3], t.b[5]);
          end
          fc_re = 12'($rtoi($floor(xr * hr - xi * hi + 0.5)));
          fc_im = 12'($rtoi($floor(xr * hi + xi * hr + 0.5)));
          fc_valid = 1; fc_first = (k == 0);
          q.push_back(t);
          @(negedge clk);
        end
        fc_valid = 0; fc_first = 0;
        n++;
      end
    end
    repeat (100) @(posedge clk);
    checks++; if (mode != MODE_8K) begin failures++; $display("mode %0d", mode); end
    checks++; if (gi != GI_1_4) begin failures++; $display("gi %0d", gi); end
    checks++; if (!sps_locked) begin failures++; $display("pilot mode not locked"); end
    checks++; if (q.size() != 0) begin failures++; $display("%0d carriers not output", q.size()); end
    // every mechanism must have happened
    checks++; if (n_switch < 2)   begin failures++; $display("mode switches %0d", n_switch); end
    checks++; if (n_gi < 1)       begin failures++; $display("no GI decision"); end
    checks++; if (n_handover != 1) begin failures++; $display("hand-overs %0d", n_handover); end
    checks++; if (n_prefill < 2)  begin failures++; $display("pre-fills %0d", n_prefill); end
    checks++; if (n_mismatch < 1) begin failures++; $display("no two-stage mismatch"); end
    checks++; if (n_preread < 1)  begin failures++; $display("no pre-read"); end
    checks++; if (n_qpsk < 1)     begin failures++; $display("no QPSK demapping"); end
    checks++; if (n_64 < 1)       begin failures++; $display("no 64-QAM demapping"); end
    $display("mode switches %0d, GI decisions %0d, hand-overs %0d, pre-fills %0d, mismatches %0d, pre-reads %0d",
             n_switch, n_gi, n_handover, n_prefill, n_mismatch, n_preread);
    $display("demapped carriers checked: QPSK %0d, 64-QAM %0d (bit errors counted as failures)", n_qpsk, n_64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- output check ----------------
  always @(posedge clk) if (rst_n && dm_valid) begin
    tag_t t;
    t = q.pop_front();
    checks++;
    if (int'(dm_k) != t.k || dm_ce_ok !== (t.n >= 9)) begin
      failures++;
      if (failures < 10) $display("symbol %0d k %0d: out k %0d ce_ok %0d", t.n, t.k, dm_k, dm_ce_ok);
    end
    if (dm_ce_ok && !t.pil) begin
      checks++;
      if (t.n >= 11) begin
        n_64++;
        if (dm_bits !== t.b) begin
          failures++;
          if (failures < 10) $display("symbol %0d k %0d: bits %b exp %b", t.n, t.k, dm_bits, t.b);
        end
      end else begin
        n_qpsk++;
        if (dm_bits !== {4'b0, t.b[1:0]}) begin
          failures++;
          if (failures < 10) $display("symbol %0d k %0d: QPSK bits %b exp %b", t.n, t.k, dm_bits, t.b[1:0]);
        end
      end
    end
  end
endmodule
