// Self-checking test of the twister delay-line: a 2K x 24-bit line (four
// modules) and an 8K x 12-bit line (eight modules), each on its own
// single-port SRAMs. Random samples with random idle cycles; the delay is
// switched between even values, and right after a switch to a longer delay
// the output must already be x(n-D) with no refill (the twister property).
// A new delay governs the output presented with the following sample.
// Also checks that no module is asked to read and write in one clock.
module tb_twister_delay_line;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // 2K, two slices
  logic        v;
  logic [23:0] din_a, dout_a;
  logic [11:0] dl_a;
  bank_req_t   req_a [4];
  logic [11:0] rd_a  [4];
  // 8K, one slice
  logic [11:0] din_b, dout_b;
  logic [13:0] dl_b;
  bank_req_t   req_b [8];
  logic [11:0] rd_b  [8];

  twister_delay_line #(.AW(11), .NSL(2)) dut_a (.clk, .rst_n, .in_valid(v), .din(din_a),
    .delay(dl_a), .dout(dout_a), .req(req_a), .rdata(rd_a));
  twister_delay_line #(.AW(13), .NSL(1)) dut_b (.clk, .rst_n, .in_valid(v), .din(din_b),
    .delay(dl_b), .dout(dout_b), .req(req_b), .rdata(rd_b));

  for (genvar b = 0; b < 4; b++) begin : g_a
    sram_sp_1k u (.clk, .en(req_a[b].en), .we(req_a[b].we), .addr(req_a[b].addr),
                  .wdata(req_a[b].wdata), .rdata(rd_a[b]));
  end
  for (genvar b = 0; b < 8; b++) begin : g_b
    sram_sp_1k u (.clk, .en(req_b[b].en), .we(req_b[b].we), .addr(req_b[b].addr),
                  .wdata(req_b[b].wdata), .rdata(rd_b[b]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] hist_a [$];
  logic [11:0] hist_b [$];
  int switches = 0;
  int eff_a = 64, eff_b = 2048;

  initial begin
    int n = 0;
    int ds_a [6] = '{64, 128, 256, 512, 1024, 2048};
    int ds_b [3] = '{2048, 4096, 8192};
    v = 0; din_a = '0; din_b = '0; dl_a = 12'd64; dl_b = 14'd2048;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    while (n < 60000) begin
      v = ($urandom % 5) != 0;
      if (v) begin
        din_a = 24'($urandom); din_b = 12'($urandom);
        // the delay in force is the one given with the previous sample
        // (the read for this sample was issued then)
        if (n % 3000 == 2998) begin
          dl_a = 12'(ds_a[$urandom % 6]);
          dl_b = 14'(ds_b[$urandom % 3]);
          switches++;
        end
        // output presented with this sample is x(n - D)
        if (n >= eff_a) begin
          logic [23:0] ea;
          int ia;
          ia = n - eff_a;
          ea = hist_a[ia];
          checks++;
          if (dout_a !== ea) begin
            failures++;
            if (failures < 10) $display("A n=%0d D=%0d got %h exp %h", n, eff_a, dout_a, ea);
          end
        end
        if (n >= eff_b) begin
          logic [11:0] eb;
          int ib;
          ib = n - eff_b;
          eb = hist_b[ib];
          checks++;
          if (dout_b !== eb) begin
            failures++;
            if (failures < 10) $display("B n=%0d D=%0d got %h exp %h", n, eff_b, dout_b, eb);
          end
        end
        eff_a = int'(dl_a); eff_b = int'(dl_b);
        hist_a.push_back(din_a);
        hist_b.push_back(din_b);
        n++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (switches < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single-port rule: one access per module per clock is guaranteed by
  // construction of the request arrays; check that both a read and a write
  // were issued each valid cycle, to distinct modules
  always @(posedge clk) if (rst_n && v) begin
    int nr, nw;
    nr = 0; nw = 0;
    for (int b = 0; b < 8; b++) if (req_b[b].en) begin if (req_b[b].we) nw++; else nr++; end
    checks++;
    if (nr != 1 || nw != 1) begin failures++; $display("8K line: %0d reads %0d writes", nr, nw); end
  end
endmodule
