// Power-based scattered pilot synchronisation (scattered pilot mode
// detection) over one OFDM symbol.
// Scattered pilots sit on carriers k = 3*(l mod 4) + 12p and are boosted to
// 4/3 amplitude, so of the four carrier classes k mod 12 = 0, 3, 6, 9 the one
// carrying this symbol's pilots collects the most power. Each carrier's power
// |SC|^2 comes in on sc_pw from the squarer that boundary detection used for
// |C|^2 and no longer needs (shared_mults); its 7 most significant bits
// (from bit PW_LSB upward, saturated) are added into the 11-bit register of
// its class, with saturation. After the last carrier the index of the
// largest register (0..3, lowest index on a tie) is the pilot mode of the
// symbol, output with a one-cycle done pulse.
// Following the document: the power-based rule of its Eqn. 4.1, 7-bit power
// and 11-bit class registers, registers enabled only for their class instead
// of multiplexers. This design's own choices: which 7 power bits are kept
// (PW_LSB), saturation, and the tie rule.
// Interface: carriers k = 0..Kmax, one per valid cycle; first marks k = 0 and
// last marks k = Kmax. Symbols that were not seen from k = 0 give no result.
module sps_detector #(
  parameter int unsigned PW_LSB = 16,
  parameter int unsigned ACC_W  = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               valid,
  input  logic               first,
  input  logic               last,
  input  logic [23:0]        sc_pw,     // |SC|^2 of this carrier, from shared_mults
  output logic               done,
  output logic [1:0]         sp_mode
);
  logic [3:0]       r12;          // k mod 12
  logic [3:0]       r12_cur;
  logic             in_sym;
  logic [ACC_W-1:0] acc [4];
  logic [23:0]      pw;
  logic [6:0]       pw7;
  logic [1:0]       cls;

  assign r12_cur = first ? 4'd0 : ((r12 == 4'd11) ? 4'd0 : r12 + 4'd1);

  always_comb begin
    pw  = sc_pw;
    pw7 = (pw >> (PW_LSB + 7)) != 0 ? 7'h7F : pw[PW_LSB +: 7];
    cls = 2'(r12_cur / 4'd3);
  end

  function automatic logic [1:0] argmax4(logic [ACC_W-1:0] a0, logic [ACC_W-1:0] a1,
                                         logic [ACC_W-1:0] a2, logic [ACC_W-1:0] a3);
    logic [ACC_W-1:0] m01, m23;
    logic [1:0]       i01, i23;
    i01 = (a1 > a0) ? 2'd1 : 2'd0;  m01 = (a1 > a0) ? a1 : a0;
    i23 = (a3 > a2) ? 2'd3 : 2'd2;  m23 = (a3 > a2) ? a3 : a2;
    return (m23 > m01) ? i23 : i01;
  endfunction

  // valid while done is high; the registers hold until the next symbol
  assign sp_mode = argmax4(acc[0], acc[1], acc[2], acc[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r12 <= '0; in_sym <= 1'b0; done <= 1'b0;
      for (int i = 0; i < 4; i++) acc[i] <= '0;
    end else begin
      done <= 1'b0;
      if (en && valid && (first || in_sym)) begin
        r12 <= r12_cur;
        for (int i = 0; i < 4; i++) begin
          logic [ACC_W-1:0] base;
          logic [ACC_W:0]   sum;
          base = first ? '0 : acc[i];
          sum  = (ACC_W+1)'(base) + (ACC_W+1)'(pw7);
          if (r12_cur % 4'd3 == 4'd0 && int'(cls) == i)
            acc[i] <= sum[ACC_W] ? '1 : sum[ACC_W-1:0];
          else
            acc[i] <= base;
        end
        if (last) begin
          in_sym <= 1'b0;
          done   <= 1'b1;
        end else begin
          in_sym <= 1'b1;
        end
      end
    end
  end
endmodule
