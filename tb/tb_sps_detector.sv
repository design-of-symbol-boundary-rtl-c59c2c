// Self-checking test of the power-based scattered pilot mode detector.
// Symbols of 2K and 4K carriers are built with boosted (4/3) pilots on the
// class of the symbol's mode and random QPSK elsewhere through a random flat
// channel; the reported mode must match, one clock after the last carrier.
// The class sums are also recomputed here and compared.
module tb_sps_detector;
  logic clk = 0, rst_n = 0, en = 1, valid = 0, first = 0, last = 0;
  logic signed [11:0] sc_re = 0, sc_im = 0;
  logic done;
  logic [1:0] sp_mode;
  int checks = 0, failures = 0;

  // |SC|^2 comes from the shared multipliers in their frequency-domain setting
  logic [23:0] sc_pw;
  shared_mults u_mult (.sel(1'b1),
    .cd_a_re('0), .cd_a_im('0), .cd_b_re('0), .cd_b_im('0), .cd_c_re(), .cd_c_im(),
    .cd_s_re('0), .cd_s_im('0), .cd_mc2(), .cd_r_re('0), .cd_r_im('0), .cd_pw(),
    .sp_x_re(sc_re), .sp_x_im(sc_im), .sp_pw(sc_pw),
    .dm_sc_re('0), .dm_sc_im('0), .dm_cr_re('0), .dm_cr_im('0), .dm_f1_re(), .dm_f1_im(), .dm_f2());
  sps_detector dut (.clk, .rst_n, .en, .valid, .first, .last, .sc_pw, .done, .sp_mode);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 24; s++) begin
      int kmax, m;
      real h_re, h_im, ph, amp;
      int ref_acc [4];
      kmax = (s % 2) ? 3408 : 1704;
      m = s % 4;
      ph = $urandom % 628 / 100.0;
      amp = 300.0 + ($urandom % 60);
      h_re = amp * $cos(ph); h_im = amp * $sin(ph);
      ref_acc = '{0, 0, 0, 0};
      for (int k = 0; k <= kmax; k++) begin
        real x_re, x_im;
        int p, p7;
        if (k % 12 == 3 * m) begin
          x_re = ($urandom % 2) ? 4.0/3.0 : -4.0/3.0; x_im = 0;
        end else begin
          x_re = ($urandom % 2) ? 0.7071 : -0.7071; x_im = ($urandom % 2) ? 0.7071 : -0.7071;
        end
        sc_re = 12'($rtoi(x_re * h_re - x_im * h_im));
        sc_im = 12'($rtoi(x_re * h_im + x_im * h_re));
        valid = 1; first = (k == 0); last = (k == kmax);
        p = int'(sc_re) * int'(sc_re) + int'(sc_im) * int'(sc_im);
        p7 = (p >> 23) != 0 ? 127 : (p >> 16) & 127;
        if (k % 3 == 0) begin
          ref_acc[(k % 12) / 3] += p7;
          if (ref_acc[(k % 12) / 3] > 2047) ref_acc[(k % 12) / 3] = 2047;
        end
        @(posedge clk); #1;
        if (k != kmax) begin checks++; if (done) begin failures++; $display("early done"); end end
      end
      valid = 0; first = 0; last = 0;
      checks++;
      if (!done) begin failures++; $display("symbol %0d: no done", s); end
      checks++;
      if (sp_mode !== 2'(m)) begin
        failures++;
        $display("symbol %0d: mode %0d exp %0d (sums %0d %0d %0d %0d)", s, sp_mode, m,
                 ref_acc[0], ref_acc[1], ref_acc[2], ref_acc[3]);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(dut.acc[i]) != ref_acc[i]) begin failures++; $display("sum %0d: %0d exp %0d", i, dut.acc[i], ref_acc[i]); end
      end
      repeat (5) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
