// Pilot reference sequence w_k of DVB-T/H: the PRBS x^11 + x^2 + 1, all ones
// at carrier k = 0, advancing one step per active carrier. A pilot on carrier
// k is transmitted as 4/3 * 2 * (1/2 - w_k), so w_k is the sign of the pilot
// (w_k = 1 means negative). The register holds w_k .. w_(k+10); the recurrence
// w_(k+11) = w_(k+2) xor w_k produces the next bit. The generator is that of
// EN 300 744, which the document cites for the pilot values.
// Interface: first=1 marks carrier 0 (w is then 1 whatever the register
// holds); adv=1 steps to the next carrier at the clock edge. w is
// combinational for the carrier present in the same cycle.
module pilot_prbs (
  input  logic clk,
  input  logic rst_n,
  input  logic first,
  input  logic adv,
  output logic w
);
  logic [10:0] sr;        // sr[i] = w_(k+i)
  logic [10:0] cur;

  assign cur = first ? 11'h7FF : sr;
  assign w   = cur[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sr <= 11'h7FF;
    else if (adv) sr <= {cur[2] ^ cur[0], cur[10:1]};
  end
endmodule
