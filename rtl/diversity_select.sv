// diversity_select: antenna selection diversity of the base-station up-link receiver.
//
// Two receivers demodulate the same user from two antennas. The selector forwards the
// bits of one of them: a locked receiver is preferred to an unlocked one, and between two
// locked receivers the one with the larger measured power wins, with a hysteresis of
// 1/8 of the current one's power to avoid toggling. The choice is re-evaluated every clock,
// so a switch takes effect at the next bit of the newly chosen receiver; a bit may be
// repeated or skipped at the switch since the two receivers are not bit aligned. Selection
// diversity is the system's; the rule is this design's.
//
// Timing: `sel` (0 = receiver A) is registered; the outputs are a registered copy of the
// chosen receiver's bit strobe.
module diversity_select (
  input  logic        clk,
  input  logic        rst,
  input  logic        a_valid,
  input  logic        a_bit_i,
  input  logic        a_bit_q,
  input  logic        a_locked,
  input  logic [31:0] a_power,
  input  logic        b_valid,
  input  logic        b_bit_i,
  input  logic        b_bit_q,
  input  logic        b_locked,
  input  logic [31:0] b_power,
  output logic        sel,
  output logic        switched,
  output logic        bit_valid,
  output logic        bit_i,
  output logic        bit_q
);
  logic want_b, want_a;
  logic [32:0] pa, pb;

  assign pa = {1'b0, a_power};
  assign pb = {1'b0, b_power};
  assign want_b = b_locked && (!a_locked || (pb > pa + (pa >> 3)));
  assign want_a = a_locked && (!b_locked || (pa > pb + (pb >> 3)));
  assign switched = (!sel && want_b) || (sel && want_a);

  always_ff @(posedge clk) begin
    if (rst) begin
      sel       <= 1'b0;
      bit_valid <= 1'b0;
      bit_i     <= 1'b0;
      bit_q     <= 1'b0;
    end else begin
      if (switched) sel <= !sel;
      bit_valid <= sel ? b_valid : a_valid;
      if (sel ? b_valid : a_valid) begin
        bit_i <= sel ? b_bit_i : a_bit_i;
        bit_q <= sel ? b_bit_q : a_bit_q;
      end
    end
  end
endmodule
