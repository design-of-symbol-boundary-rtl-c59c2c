// Self-checking test of the three-multiplier complex multiplier: random and
// corner operands, result compared with a*conj(b) computed directly.
module tb_cmult3;
  logic signed [11:0] a_re, a_im;
  logic signed [13:0] b_re, b_im;
  logic signed [27:0] p_re, p_im;
  int checks = 0, failures = 0;
  logic clk = 0;

  cmult3 #(.AW(12), .BW(14)) dut (.a_re, .a_im, .b_re, .b_im, .p_re, .p_im);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei;
    for (int i = 0; i < 20000; i++) begin
      if (i < 4) begin
        a_re = (i & 1) ? 12'sh800 : 12'sh7FF; a_im = 12'sh800;
        b_re = (i & 2) ? 14'sh2000 : 14'sh1FFF; b_im = 14'sh2000;
      end else begin
        a_re = 12'($urandom); a_im = 12'($urandom); b_re = 14'($urandom); b_im = 14'($urandom);
      end
      #1;
      er = longint'(a_re) * longint'(b_re) + longint'(a_im) * longint'(b_im);
      ei = longint'(a_im) * longint'(b_re) - longint'(a_re) * longint'(b_im);
      checks++;
      if (longint'(p_re) != er || longint'(p_im) != ei) begin
        failures++;
        if (failures < 10) $display("a=%0d,%0dj b=%0d,%0dj got %0d,%0dj exp %0d,%0dj",
                                    a_re, a_im, b_re, b_im, p_re, p_im, er, ei);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
