// Self-checking test of the shared memory bank: each of the fourteen modules
// is filled through the boundary-detection port, ownership is handed to the
// channel-estimation port, and the same words must be read back there (and
// the other port's requests must be ignored). Then the channel-estimation
// port writes and the ownership goes back.
module tb_memory_bank;
  import dvb_pkg::*;
  logic clk = 0, own_ce;
  bank_req_t css_req [NBANK];
  bank_req_t ce_req  [NBANK];
  logic [BANK_W-1:0] rdata [NBANK];
  int checks = 0, failures = 0;
  logic [11:0] pat [NBANK][16];

  memory_bank dut (.clk, .own_ce, .css_req, .ce_req, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_all();
    for (int b = 0; b < NBANK; b++) begin css_req[b] = BANK_IDLE; ce_req[b] = BANK_IDLE; end
  endtask

  initial begin
    idle_all();
    own_ce = 0;
    // fill through the CSS port; CE port tries to write garbage at the same time
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < NBANK; b++) begin
        pat[b][a] = 12'($urandom);
        css_req[b] = '{en: 1'b1, we: 1'b1, addr: 10'(a * 37), wdata: pat[b][a]};
        ce_req[b]  = '{en: 1'b1, we: 1'b1, addr: 10'(a * 37), wdata: 12'hABC};
      end
      @(posedge clk); #1;
    end
    idle_all();
    own_ce = 1;
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < NBANK; b++) ce_req[b] = '{en: 1'b1, we: 1'b0, addr: 10'(a * 37), wdata: '0};
      @(posedge clk); #1;
      for (int b = 0; b < NBANK; b++) begin
        checks++;
        if (rdata[b] !== pat[b][a]) begin
          failures++;
          $display("bank %0d addr %0d: got %h exp %h", b, a * 37, rdata[b], pat[b][a]);
        end
      end
    end
    // CE writes, CSS reads back after handing over again
    for (int b = 0; b < NBANK; b++) ce_req[b] = '{en: 1'b1, we: 1'b1, addr: 10'(b), wdata: 12'(b * 111)};
    @(posedge clk); #1;
    idle_all();
    own_ce = 0;
    for (int b = 0; b < NBANK; b++) css_req[b] = '{en: 1'b1, we: 1'b0, addr: 10'(b), wdata: '0};
    @(posedge clk); #1;
    for (int b = 0; b < NBANK; b++) begin
      checks++;
      if (rdata[b] !== 12'(b * 111)) begin failures++; $display("bank %0d back: %h", b, rdata[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
