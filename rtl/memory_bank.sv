// Shared memory bank: fourteen single-port 1K x 12 SRAM modules and the
// owner switch in front of them.
// While own_ce=0 the coarse-symbol-synchronisation delay-lines own every
// module (8 for the 8K correlation delay-line, 4 for the complex moving-sum
// delay-line, 2 for the power moving-sum delay-line). Once the symbol
// boundary is found own_ce=1 hands all fourteen to the channel estimator,
// which uses them as seven groups of two (real / imaginary) to hold seven
// symbols of scattered pilots. Sharing the bank instead of adding separate
// pilot memories is the document's; the plain two-way request multiplexer is
// this design's own realisation. Read data is returned one clock after the
// request, to whichever client owns the bank.
module memory_bank
  import dvb_pkg::*;
(
  input  logic                 clk,
  input  logic                 own_ce,
  input  bank_req_t            css_req [NBANK],
  input  bank_req_t            ce_req  [NBANK],
  output logic [BANK_W-1:0]    rdata   [NBANK]
);
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    bank_req_t req;
    assign req = own_ce ? ce_req[b] : css_req[b];
    sram_sp_1k #(.DEPTH(1 << BANK_AW), .WIDTH(BANK_W)) u_sram (
      .clk  (clk),
      .en   (req.en),
      .we   (req.we),
      .addr (req.addr),
      .wdata(req.wdata),
      .rdata(rdata[b])
    );
  end
endmodule
