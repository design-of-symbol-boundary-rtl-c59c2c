// Reconfigurable delay-line on single-port 1K x 12 SRAM modules with the
// "twister" circular access.
// Every valid sample is written at the next address of one circular buffer
// that spans all 2**AW words, whatever delay is selected, so a longer delay
// can be switched in at any time without refilling: the older samples are
// already there. The read pointer runs (delay - 1) addresses behind the
// write pointer, one sample ahead of need; the word read on sample n is
// x(n+1-delay) and is presented as dout while sample n+1 is on din.
// Because every supported delay is even, the read address always has the
// opposite parity of the write address. Address bit 0 picks one of two bank
// halves, so reads and writes always land in different single-port modules
// and one sample per clock is sustained with no dual-port memory. This
// parity interleave is this design's realisation of the document's
// interleaved read/write on single-port SRAMs.
// Each word is WIDTH = 12*NSL bits, split across NSL slices of modules.
// Bank numbering: module (s*NBS + {addr[AW-1:BANK_AW+1], addr[0]}) holds
// slice s. Delay must be even and between 2 and 2**AW.
// Timing: dout is valid in the clock of the sample after the one that issued
// the read, and it holds between valid samples. Because the read is issued
// one sample ahead, a new delay value given with sample n governs the output
// presented with sample n+1 onward.
module twister_delay_line
  import dvb_pkg::*;
#(
  parameter int unsigned AW  = 13,
  parameter int unsigned NSL = 1,
  localparam int unsigned NBS   = 1 << (AW - BANK_AW),
  localparam int unsigned NB    = NSL * NBS,
  localparam int unsigned WIDTH = NSL * BANK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WIDTH-1:0]  din,
  input  logic [AW:0]       delay,
  output logic [WIDTH-1:0]  dout,
  output bank_req_t         req   [NB],
  input  logic [BANK_W-1:0] rdata [NB]
);
  logic [AW-1:0] wptr, rptr;
  logic [$clog2(NBS)-1:0] rsel_q;

  function automatic int unsigned bank_of(logic [AW-1:0] a);
    return int'(AW'(a >> (BANK_AW + 1))) * 2 + int'(a[0]);
  endfunction

  assign rptr = AW'(wptr + AW'(1) - delay[AW-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      rsel_q <= '0;
    end else if (in_valid) begin
      wptr   <= wptr + AW'(1);
      rsel_q <= ($clog2(NBS))'(bank_of(rptr));
    end
  end

  always_comb begin
    for (int b = 0; b < NB; b++) req[b] = BANK_IDLE;
    if (in_valid) begin
      for (int s = 0; s < NSL; s++) begin
        req[s*NBS + bank_of(wptr)] = '{en: 1'b1, we: 1'b1, addr: wptr[BANK_AW:1],
                                       wdata: din[s*BANK_W +: BANK_W]};
        req[s*NBS + bank_of(rptr)] = '{en: 1'b1, we: 1'b0, addr: rptr[BANK_AW:1],
                                       wdata: '0};
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NSL; s++) dout[s*BANK_W +: BANK_W] = rdata[s*NBS + int'(rsel_q)];
  end

  a_delay_even: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (delay[0] == 1'b0 && delay >= 2 && delay <= (AW+1)'(1 << AW)));
endmodule
