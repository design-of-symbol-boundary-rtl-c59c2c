// Acquisition under channel impairments: repeated blind mode / GI / boundary
// detection runs of css_detector (with its memory bank and the shared
// multipliers) on 2K and 8K streams with a 1/4 guard interval, white Gaussian
// noise at 12 dB SNR, a three-path Rayleigh channel drawn anew for every run
// and a carrier frequency offset of 23.33 carrier spacings. Each run starts
// from reset at a random point of the stream. Checks per run: lock within
// the time limit, the right mode and guard interval, and fft_sym_start no
// further than G/8 from the ideal point (half-way through the guard
// interval), which keeps the FFT window inside the interference-free part
// for this channel. Prints the mean and largest boundary offset and the
// lock times.
//
// Signal model: useful samples are complex Gaussian (as an OFDM symbol is),
// standard deviation 6 per component before the channel, quantised to 6 bits
// with saturation; the channel taps sit at delays 0, 3 and 7 samples with
// mean powers 1, 1/2 and 1/4, normalised to unit total power.
module tb_css_acquisition;
  import dvb_pkg::*;
  localparam int RUNS_PER_MODE = 10;
  localparam real SNR_DB = 12.0;
  localparam real CFO = 23.33;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, r_valid = 0;
  logic signed [5:0] r_re = 0, r_im = 0;
  bank_req_t css_req [NBANK];
  bank_req_t ce_req [NBANK];
  logic [BANK_W-1:0] rdata [NBANK];
  tx_mode_e mode;
  gi_e gi;
  logic locked, sym_start, thr, ev_mode_switch, ev_gi_found, ev_restart;
  logic signed [5:0]  mb_re, mb_im;
  logic signed [13:0] mc_re, mc_im;
  logic signed [10:0] sq_re, sq_im;
  logic [21:0]        sq_mc2;
  logic [11:0]        pw;
  int checks = 0, failures = 0;

  always_comb for (int b = 0; b < NBANK; b++) ce_req[b] = BANK_IDLE;
  memory_bank u_bank (.clk, .own_ce(1'b0), .css_req, .ce_req, .rdata);
  shared_mults u_mult (.sel(1'b0),
    .cd_a_re(r_re), .cd_a_im(r_im), .cd_b_re(mb_re), .cd_b_im(mb_im), .cd_c_re(mc_re), .cd_c_im(mc_im),
    .cd_s_re(sq_re), .cd_s_im(sq_im), .cd_mc2(sq_mc2), .cd_r_re(r_re), .cd_r_im(r_im), .cd_pw(pw),
    .sp_x_re('0), .sp_x_im('0), .sp_pw(),
    .dm_sc_re('0), .dm_sc_im('0), .dm_cr_re('0), .dm_cr_im('0), .dm_f1_re(), .dm_f1_im(), .dm_f2());
  css_detector dut (.clk, .rst_n, .r_valid, .r_re, .r_im, .css_req, .rdata, .mode, .gi,
    .locked, .sym_start, .mul_b_re(mb_re), .mul_b_im(mb_im), .mul_c_re(mc_re), .mul_c_im(mc_im),
    .sq_re, .sq_im, .sq_mc2, .pw_in(pw), .thr, .ev_mode_switch, .ev_gi_found, .ev_restart);
  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    return ($itor($urandom % 1000000) + 0.5) / 1000000.0;
  endfunction
  function automatic real gauss();
    real u1, u2;
    u1 = urand(); u2 = urand();
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction
  function automatic logic signed [5:0] q6(real v);
    int i;
    i = $rtoi($floor(v + 0.5));
    if (i > 31) i = 31;
    if (i < -32) i = -32;
    return 6'(i);
  endfunction

  real sym_re [8192];
  real sym_im [8192];
  real hist_re [8];
  real hist_im [8];
  real h_re [3];
  real h_im [3];
  int  dly [3] = '{0, 3, 7};
  real pw_tap [3] = '{1.0, 0.5, 0.25};

  int sum_err = 0, max_err = 0, n_ok = 0;

  task automatic run(int n_len, tx_mode_e exp_mode);
    int g, sl, off, sample, first_err, lock_at, lim;
    real tot, sig, sn, ph;
    g = n_len / 4; sl = n_len + g;
    // channel for this run
    tot = 0.0;
    for (int t = 0; t < 3; t++) begin
      h_re[t] = gauss() * $sqrt(pw_tap[t] / 2.0);
      h_im[t] = gauss() * $sqrt(pw_tap[t] / 2.0);
      tot += h_re[t] * h_re[t] + h_im[t] * h_im[t];
    end
    for (int t = 0; t < 3; t++) begin h_re[t] /= $sqrt(tot); h_im[t] /= $sqrt(tot); end
    for (int t = 0; t < 8; t++) begin hist_re[t] = 0.0; hist_im[t] = 0.0; end
    sig = 6.0;
    sn  = sig / $pow(10.0, SNR_DB / 20.0);
    off = $urandom % sl;
    lim = 3 * sl + 6 * n_len;
    lock_at = -1; first_err = 0;
    rst_n = 0; r_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    sample = 0;
    while (sample < lim && lock_at < 0) begin
      int pos;
      real xr, xi, yr, yi, c, s;
      pos = (sample + off) % sl;
      if (pos == 0 || sample == 0)
        for (int j = 0; j < n_len; j++) begin sym_re[j] = sig * gauss(); sym_im[j] = sig * gauss(); end
      if (pos < g) begin xr = sym_re[n_len - g + pos]; xi = sym_im[n_len - g + pos]; end
      else         begin xr = sym_re[pos - g];         xi = sym_im[pos - g]; end
      for (int t = 7; t > 0; t--) begin hist_re[t] = hist_re[t-1]; hist_im[t] = hist_im[t-1]; end
      hist_re[0] = xr; hist_im[0] = xi;
      yr = 0.0; yi = 0.0;
      for (int t = 0; t < 3; t++) begin
        yr += h_re[t] * hist_re[dly[t]] - h_im[t] * hist_im[dly[t]];
        yi += h_re[t] * hist_im[dly[t]] + h_im[t] * hist_re[dly[t]];
      end
      ph = 2.0 * PI * CFO * $itor(sample) / $itor(n_len);
      c = $cos(ph); s = $sin(ph);
      r_re = q6(yr * c - yi * s + sn * gauss());
      r_im = q6(yr * s + yi * c + sn * gauss());
      r_valid = 1;
      #1;
      if (sym_start) begin
        int e;
        e = pos - g / 2;
        if (e > sl / 2) e -= sl;
        if (e < -sl / 2) e += sl;
        first_err = e;
        lock_at = sample;
      end
      @(posedge clk); #1;
      sample++;
    end
    r_valid = 0;
    checks++;
    if (lock_at < 0) begin
      failures++;
      $display("%0dK run: no lock within %0d samples", n_len / 1024, lim);
    end else begin
      int ae;
      ae = first_err < 0 ? -first_err : first_err;
      checks += 3;
      if (mode != exp_mode) begin failures++; $display("%0dK run: mode %s", n_len / 1024, mode.name()); end
      if (gi != GI_1_4) begin failures++; $display("%0dK run: gi %s", n_len / 1024, gi.name()); end
      if (ae > g / 8) begin failures++; $display("%0dK run: boundary off by %0d", n_len / 1024, first_err); end
      else n_ok++;
      sum_err += ae;
      if (ae > max_err) max_err = ae;
      $display("%0dK GI 1/4, 12 dB, CFO 23.33: locked after %0d samples, boundary offset %0d",
               n_len / 1024, lock_at, first_err);
    end
  endtask

  initial begin
    for (int i = 0; i < RUNS_PER_MODE; i++) begin
      run(2048, MODE_2K);
      run(8192, MODE_8K);
    end
    $display("%0d of %0d runs within G/8; mean |offset| %0d, largest %0d samples",
             n_ok, 2 * RUNS_PER_MODE, sum_err / (2 * RUNS_PER_MODE), max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
