// Self-checking test of the channel estimator with its two-stage pilot
// synchronisation control, on the shared memory bank, in 2K mode.
// Symbols carry QPSK data and boosted scattered pilots (sign from the pilot
// PRBS, recomputed here) through a channel that varies linearly in time and
// frequency, for which predictive 2-D estimation followed by linear
// interpolation is exact up to rounding. The pilot-mode result is driven by
// the test: the second-stage check of the first attempt is made to disagree,
// so the scheme must drop its stored pilots and start over with a new
// pre-fill symbol. Checks: carriers come out 4 clocks later unchanged;
// estimates are flagged valid from the 7th symbol after the accepted
// pre-fill symbol on; every valid estimate is within TOL of the true
// channel; the mismatch, pre-fill and pre-read mechanisms each occur.
module tb_channel_estimator;
  import dvb_pkg::*;
  localparam int KMAX = 1704;
  localparam int TOL  = 6;
  localparam int NSYM = 14;
  localparam int MODE0 = 1;       // pilot mode of symbol 0

  logic clk = 0, rst_n = 0;
  logic fc_valid = 0, fc_first = 0, fc_last = 0;
  logic [12:0] fc_k = 0;
  logic signed [11:0] fc_re = 0, fc_im = 0;
  logic sps_done = 0;
  logic [1:0] sps_mode = 0;
  bank_req_t css_req [NBANK];
  bank_req_t ce_req  [NBANK];
  logic [BANK_W-1:0] rdata [NBANK];
  logic out_valid, out_ce_ok, sps_locked, ev_prefill, ev_mismatch, ev_preread;
  logic [12:0] out_k;
  logic signed [11:0] out_sc_re, out_sc_im;
  logic signed [13:0] out_cr_re, out_cr_im;
  logic [1:0] cur_mode;
  int checks = 0, failures = 0;
  int n_prefill = 0, n_mismatch = 0, n_preread = 0, n_est = 0;

  always_comb for (int b = 0; b < NBANK; b++) css_req[b] = BANK_IDLE;
  memory_bank u_bank (.clk, .own_ce(1'b1), .css_req, .ce_req, .rdata);
  channel_estimator dut (.clk, .rst_n, .en(1'b1), .fc_valid, .fc_first, .fc_last, .fc_k, .fc_re, .fc_im,
    .sps_done, .sps_mode, .ce_req, .rdata, .out_valid, .out_k, .out_sc_re, .out_sc_im,
    .out_cr_re, .out_cr_im, .out_ce_ok, .sps_locked, .cur_mode, .ev_prefill, .ev_mismatch, .ev_preread);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit w [KMAX+1];

  function automatic real h_re(int n, int k); return 600.0 + 8.0 * n + 0.2 * k; endfunction
  function automatic real h_im(int n, int k); return 300.0 - 5.0 * n + 0.1 * k; endfunction

  typedef struct { int n; int k; logic signed [11:0] re, im; } tag_t;
  tag_t q [$];

  always @(posedge clk) if (rst_n) begin
    if (ev_prefill) n_prefill++;
    if (ev_mismatch) n_mismatch++;
    if (ev_preread) n_preread++;
    if (rst_n && out_valid) begin
      tag_t t;
      t = q.pop_front();
      checks++;
      if (int'(out_k) != t.k || out_sc_re !== t.re || out_sc_im !== t.im) begin
        failures++; if (failures < 10) $display("stream mismatch at k %0d", t.k);
      end
      // symbols 0,1: rejected attempt; 2: accepted pre-fill; 2..8 stored; 9 on estimated
      checks++;
      if (out_ce_ok !== (t.n >= 9)) begin
        failures++; if (failures < 10) $display("symbol %0d: ce_ok %0d", t.n, out_ce_ok);
      end
      if (out_ce_ok) begin
        real er, ei, hr, hi;
        int tn, tk;
        tn = t.n; tk = t.k;
        hr = 600.0 + 8.0 * tn + 0.2 * tk; hi = 300.0 - 5.0 * tn + 0.1 * tk;
        er = $itor(out_cr_re);
        ei = $itor(out_cr_im);
        er = er - hr;
        ei = ei - hi;
        n_est++;
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 10) $display("n %0d k %0d: CR %0d,%0d exp %0.1f,%0.1f", tn, tk,
                                      out_cr_re, out_cr_im, hr, hi);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i <= KMAX; i++) w[i] = (i < 11) ? 1'b1 : w[i-11] ^ w[i-9];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NSYM; n++) begin
      int m;
      m = (MODE0 + n) % 4;
      for (int k = 0; k <= KMAX; k++) begin
        real xr, xi;
        tag_t t;
        if (k % 12 == 3 * m) begin
          xr = w[k] ? -4.0/3.0 : 4.0/3.0; xi = 0.0;
        end else begin
          xr = ($urandom % 2) ? 0.7071 : -0.7071; xi = ($urandom % 2) ? 0.7071 : -0.7071;
        end
        fc_re = 12'($rtoi($floor(xr * h_re(n, k) - xi * h_im(n, k) + 0.5)));
        fc_im = 12'($rtoi($floor(xr * h_im(n, k) + xi * h_re(n, k) + 0.5)));
        fc_valid = 1; fc_first = (k == 0); fc_last = (k == KMAX); fc_k = 13'(k);
        t.n = n; t.k = k; t.re = fc_re; t.im = fc_im;
        q.push_back(t);
        @(negedge clk);
      end
      fc_valid = 0; fc_first = 0; fc_last = 0;
      // pilot-mode result one clock after the last carrier; symbol 1 is
      // reported wrongly so the first two-stage check fails
      sps_done = 1;
      sps_mode = (n == 1) ? 2'(m + 2) : 2'(m);
      @(negedge clk);
      sps_done = 0;
      repeat (12) @(negedge clk);
      if (n == 3) begin
        checks++; if (!sps_locked) begin failures++; $display("not locked after symbol 3"); end
      end
    end
    repeat (10) @(negedge clk);
    checks++; if (n_mismatch != 1) begin failures++; $display("mismatches %0d", n_mismatch); end
    checks++; if (n_prefill != 2) begin failures++; $display("pre-fill symbols %0d", n_prefill); end
    checks++; if (n_preread == 0) begin failures++; $display("pre-read never used"); end
    checks++; if (n_est < 4 * (KMAX + 1)) begin failures++; $display("only %0d estimates", n_est); end
    $display("estimates %0d, pre-reads %0d", n_est, n_preread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
