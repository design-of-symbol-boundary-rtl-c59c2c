// Self-checking test of the pilot PRBS: three active-carrier runs (2K, 8K
// and a short one) compared against w_i = w_(i-11) xor w_(i-9) with
// w_0..w_10 = 1, restarted on each first carrier; also checks the known
// opening 11 ones followed by 9 zeros.
module tb_pilot_prbs;
  logic clk = 0, rst_n = 0, first = 0, adv = 0, w;
  int checks = 0, failures = 0;
  bit ref_w [6817];

  pilot_prbs dut (.clk, .rst_n, .first, .adv, .w);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [3] = '{1705, 6817, 40};
    for (int i = 0; i < 6817; i++) ref_w[i] = (i < 11) ? 1'b1 : ref_w[i-11] ^ ref_w[i-9];
    for (int i = 11; i < 20; i++) begin
      checks++; if (ref_w[i] != 0) failures++;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < lens[r]; k++) begin
        first = (k == 0); adv = 1;
        #1;
        checks++;
        if (w !== ref_w[k]) begin
          failures++;
          if (failures < 10) $display("run %0d k %0d: w %0d exp %0d", r, k, w, ref_w[k]);
        end
        @(posedge clk); #1;
        // idle cycles in between must not advance the sequence
        if (k % 97 == 5) begin adv = 0; first = 0; @(posedge clk); #1; end
      end
      adv = 0; first = 0;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
