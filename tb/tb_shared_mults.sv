// Test of the shared multiplier unit in both of its settings. Random and
// extreme operands are applied to both clients at once; with sel = 0 the
// boundary-detector products must be exact and must not depend on the
// frequency-domain operands, and with sel = 1 the reverse. Reference values
// are computed here with plain integer arithmetic. Combinational unit: each
// result is checked 1 time unit after the operands change.
module tb_shared_mults;
  logic sel;
  logic signed [5:0]  cd_a_re, cd_a_im, cd_b_re, cd_b_im, cd_r_re, cd_r_im;
  logic signed [13:0] cd_c_re, cd_c_im;
  logic signed [10:0] cd_s_re, cd_s_im;
  logic [21:0]        cd_mc2;
  logic [11:0]        cd_pw;
  logic signed [11:0] sp_x_re, sp_x_im, dm_sc_re, dm_sc_im;
  logic [23:0]        sp_pw;
  logic signed [13:0] dm_cr_re, dm_cr_im;
  logic signed [27:0] dm_f1_re, dm_f1_im;
  logic [27:0]        dm_f2;
  int checks = 0, failures = 0;

  shared_mults dut (.sel, .cd_a_re, .cd_a_im, .cd_b_re, .cd_b_im, .cd_c_re, .cd_c_im,
    .cd_s_re, .cd_s_im, .cd_mc2, .cd_r_re, .cd_r_im, .cd_pw, .sp_x_re, .sp_x_im, .sp_pw,
    .dm_sc_re, .dm_sc_im, .dm_cr_re, .dm_cr_im, .dm_f1_re, .dm_f1_im, .dm_f2);

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(int bits, int i);
    int lo, hi;
    lo = -(1 << (bits - 1)); hi = (1 << (bits - 1)) - 1;
    case (i % 8)
      0: return lo;
      1: return hi;
      default: return lo + int'($urandom % (hi - lo + 1));
    endcase
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("sel %0d %s: got %0d expected %0d", sel, what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint ar, ai, br, bi, sr, si, rr, ri, xr, xi, scr, sci, crr, cri;
      sel = i[0];
      ar = pick(6, i); ai = pick(6, i + 3); br = pick(6, i + 5); bi = pick(6, i + 1);
      sr = pick(11, i + 2); si = pick(11, i + 7); rr = pick(6, i + 4); ri = pick(6, i + 6);
      xr = pick(12, i + 1); xi = pick(12, i + 2); scr = pick(12, i + 3); sci = pick(12, i + 4);
      crr = pick(14, i + 5); cri = pick(14, i + 6);
      cd_a_re = 6'(ar); cd_a_im = 6'(ai); cd_b_re = 6'(br); cd_b_im = 6'(bi);
      cd_s_re = 11'(sr); cd_s_im = 11'(si); cd_r_re = 6'(rr); cd_r_im = 6'(ri);
      sp_x_re = 12'(xr); sp_x_im = 12'(xi); dm_sc_re = 12'(scr); dm_sc_im = 12'(sci);
      dm_cr_re = 14'(crr); dm_cr_im = 14'(cri);
      #1;
      if (!sel) begin
        check("corr re", longint'(cd_c_re), ar * br + ai * bi);
        check("corr im", longint'(cd_c_im), ai * br - ar * bi);
        check("|C|^2", longint'(cd_mc2), sr * sr + si * si);
        check("|r|^2", longint'(cd_pw), rr * rr + ri * ri);
      end else begin
        check("|SC|^2", longint'(sp_pw), xr * xr + xi * xi);
        check("F1 re", longint'(dm_f1_re), scr * crr + sci * cri);
        check("F1 im", longint'(dm_f1_im), sci * crr - scr * cri);
        check("F2", longint'(dm_f2), crr * crr + cri * cri);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
