// Eight-state confidence counter that turns the raw plateau test
// (|C|^2 - P^2/2 >= 0) into a clean threshold flag.
// A 3-bit saturating counter moves up on each sample whose raw test passes
// and down on each that fails. The flag rises when the counter reaches 7 and
// falls when it reaches 0, so a flag edge needs at least 7 consistent votes
// in a row from the opposite side; rising and falling edges are delayed by
// the same amount, which keeps the measured plateau length unbiased.
// The document names an 8-state confidence counter; the up/down rule and the
// hysteresis points are this design's choice. clr resets the counter to 0.
module conf_counter (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic hit,
  output logic flag
);
  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      flag <= 1'b0;
    end else if (clr) begin
      cnt  <= '0;
      flag <= 1'b0;
    end else if (en) begin
      if (hit && cnt != 3'd7) cnt <= cnt + 3'd1;
      else if (!hit && cnt != 3'd0) cnt <= cnt - 3'd1;
      if (hit && cnt == 3'd6) flag <= 1'b1;
      else if (!hit && cnt == 3'd1) flag <= 1'b0;
    end
  end
endmodule
