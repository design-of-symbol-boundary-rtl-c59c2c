// Self-checking test of the 1K x 12 single-port SRAM: random writes and
// reads against a reference array, read-data hold while disabled, and the
// one-clock read latency.
module tb_sram_sp_1k;
  logic clk = 0, en, we;
  logic [9:0]  addr;
  logic [11:0] wdata, rdata;
  logic [11:0] ref_mem [1024];
  int checks = 0, failures = 0;

  sram_sp_1k dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_q;
    en = 1; we = 1;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a); wdata = 12'($urandom); ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 5000; i++) begin
      addr = 10'($urandom);
      en   = ($urandom % 4) != 0;
      we   = ($urandom % 2) != 0;
      wdata = 12'($urandom);
      exp_q = rdata;
      if (en && !we) exp_q = ref_mem[addr];
      if (en && we) ref_mem[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("mismatch addr %0d: got %h exp %h", addr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
