// Single-port synchronous SRAM module, 1K words of 12 bits.
// One access per clock: with en=1 and we=1 the word at addr is written; with
// en=1 and we=0 it is read and appears on rdata after the clock edge. rdata
// holds its value while en=0. Fourteen of these form the shared memory bank;
// the 1K x 12 organisation is the document's, the read-hold behaviour is a
// modelling choice that matches common single-port macros.
module sram_sp_1k #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
