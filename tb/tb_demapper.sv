// Self-checking test of the division-free three-stage demapper. For QPSK and
// for uniform and non-uniform 16-QAM and 64-QAM (alpha 1, 2, 4), random bit
// groups are mapped to constellation points here (EN 300 744 Gray mapping,
// normalised), passed through a random complex channel gain CR, and fed as
// SC = X*CR with CR. The demapper must return the original bits three clocks
// later, one symbol per clock.
module tb_demapper;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] sc_re = 0, sc_im = 0;
  logic signed [13:0] cr_re = 0, cr_im = 0;
  const_e cmode = CONST_QPSK;
  logic [1:0] alpha = 0;
  logic out_valid;
  logic [5:0] y;
  int checks = 0, failures = 0;

  // F1 and F2 come from the shared multipliers in their frequency-domain setting
  logic signed [27:0] f1_re, f1_im;
  logic [27:0]        f2;
  shared_mults u_mult (.sel(1'b1),
    .cd_a_re('0), .cd_a_im('0), .cd_b_re('0), .cd_b_im('0), .cd_c_re(), .cd_c_im(),
    .cd_s_re('0), .cd_s_im('0), .cd_mc2(), .cd_r_re('0), .cd_r_im('0), .cd_pw(),
    .sp_x_re('0), .sp_x_im('0), .sp_pw(),
    .dm_sc_re(sc_re), .dm_sc_im(sc_im), .dm_cr_re(cr_re), .dm_cr_im(cr_im),
    .dm_f1_re(f1_re), .dm_f1_im(f1_im), .dm_f2(f2));
  demapper dut (.clk, .rst_n, .in_valid, .f1_re, .f1_im, .f2, .cmode, .alpha, .out_valid, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // amplitude of one axis from its bits (b0 = sign bit, b1, b2)
  function automatic real level(const_e c, int a, bit b0, bit b1, bit b2);
    real m;
    if (c == CONST_QPSK) m = 1.0;
    else if (c == CONST_16QAM) m = b1 ? a : a + 2;
    else m = b1 ? (b2 ? a + 2 : a) : (b2 ? a + 4 : a + 6);
    return b0 ? -m : m;
  endfunction

  function automatic real nf(const_e c, int a);
    if (c == CONST_QPSK) return 1.0 / $sqrt(2.0);
    if (c == CONST_16QAM) return 1.0 / $sqrt(a == 1 ? 10.0 : a == 2 ? 20.0 : 52.0);
    return 1.0 / $sqrt(a == 1 ? 42.0 : a == 2 ? 60.0 : 108.0);
  endfunction

  logic [5:0] exp_q [$];
  logic       tested [3][3];

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [5:0] e;
    e = exp_q.pop_front();
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("mode %0d alpha %0d: bits %b exp %b", cmode, alpha, y, e);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      for (int ai = 0; ai < 3; ai++) begin
        int a;
        a = (c == 0) ? 1 : (1 << ai);
        if (c == 0 && ai > 0) continue;
        in_valid = 0;
        repeat (5) @(posedge clk);   // let the pipeline drain before the mode changes
        @(negedge clk);
        cmode = const_e'(c); alpha = 2'(ai);
        for (int i = 0; i < 3000; i++) begin
          bit [5:0] b;
          real xr, xi, hr, hi, amp, ph, s;
          logic [5:0] e;
          b = 6'($urandom);
          if (c == 0) b[5:2] = 0;
          if (c == 1) b[5:4] = 0;
          s  = nf(const_e'(c), a);
          xr = level(const_e'(c), a, b[0], b[2], b[4]) * s;
          xi = level(const_e'(c), a, b[1], b[3], b[5]) * s;
          amp = 300.0 + ($urandom % 1000);
          ph  = ($urandom % 6283) / 1000.0;
          hr = amp * $cos(ph); hi = amp * $sin(ph);
          cr_re = 14'($rtoi(hr)); cr_im = 14'($rtoi(hi));
          sc_re = 12'($rtoi(xr * hr - xi * hi));
          sc_im = 12'($rtoi(xr * hi + xi * hr));
          in_valid = 1;
          exp_q.push_back(b);
          tested[c][ai] = 1;
          @(negedge clk);
        end
      end
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
