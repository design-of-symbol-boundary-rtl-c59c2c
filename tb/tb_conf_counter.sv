// Self-checking test of the 8-state confidence counter: random vote streams
// with runs, compared against a behavioural reference; also checks that an
// isolated opposite vote never toggles the flag and that edges lag by 7.
module tb_conf_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, hit = 0, flag;
  int checks = 0, failures = 0;
  int rc = 0; logic rf = 0;

  conf_counter dut (.clk, .rst_n, .clr, .en, .hit, .flag);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic h, logic e, logic c);
    hit = h; en = e; clr = c;
    @(posedge clk); #1;
    if (c) begin rc = 0; rf = 0; end
    else if (e) begin
      if (h && rc == 6) rf = 1;
      if (!h && rc == 1) rf = 0;
      if (h && rc < 7) rc++;
      else if (!h && rc > 0) rc--;
    end
    checks++;
    if (flag !== rf) begin
      failures++;
      if (failures < 10) $display("flag %0d exp %0d (count %0d)", flag, rf, rc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // a run of 7 hits raises the flag on the 7th
    for (int i = 0; i < 7; i++) step(1, 1, 0);
    checks++; if (flag !== 1) begin failures++; $display("flag not raised after 7 hits"); end
    // a single miss does not drop it
    step(0, 1, 0); step(1, 1, 0);
    checks++; if (flag !== 1) begin failures++; $display("flag dropped by a single miss"); end
    for (int i = 0; i < 20000; i++) begin
      logic h;
      int run;
      h = $urandom % 2; run = 1 + $urandom % 12;
      for (int j = 0; j < run; j++) step(h, ($urandom % 8) != 0, ($urandom % 500) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
