// ul_multiplexer: time-division multiplexer of the mobile's services onto I and Q.
//
// The terminal's encoded streams (0 voice, 1 data, 2 video, 3 signalling) share the two
// 128 kbit/s up-link channels. Bit slots repeat in a frame of N_SLOTS slots per branch;
// the tables SLOT_I and SLOT_Q (2 bits per slot, slot 0 in the low bits) name the owner of
// each slot. On every `bit_en` the owner of the current I slot and of the current Q slot
// give a bit if they have one; a slot whose owner is empty goes to the first other source
// (in index order) that has a bit and was not served by the other branch; otherwise the
// slot carries a 0. `src_ready` pulses for the sources served. TDM of the four services
// onto I and Q is the system's; the slot tables and the fill rule are this design's.
//
// Timing: bit_i/bit_q change on the clock where `bit_en` is high and hold for a bit.
module ul_multiplexer
  import cdma_pkg::*;
#(
  parameter int                 N_SLOTS = 8,
  parameter logic [2*N_SLOTS-1:0] SLOT_I  = 16'b10_11_10_00_10_01_10_00, // slots 0..7: V,D,V,Vid,S,Vid,V,Vid
  parameter logic [2*N_SLOTS-1:0] SLOT_Q  = 16'b10_10_10_10_10_10_10_10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_en,
  input  logic [3:0] src_valid,
  input  logic [3:0] src_bit,
  output logic [3:0] src_ready,
  output logic       bit_i,
  output logic       bit_q,
  output logic [$clog2(N_SLOTS)-1:0] slot
);
  localparam int SLW = $clog2(N_SLOTS);
  logic [1:0] own_i, own_q;
  logic [3:0] take_i, take_q;

  assign own_i = SLOT_I[2*slot +: 2];
  assign own_q = SLOT_Q[2*slot +: 2];

  always_comb begin
    take_i = '0;
    take_q = '0;
    if (src_valid[own_i]) take_i[own_i] = 1'b1;
    if (src_valid[own_q] && (own_q != own_i || !take_i[own_q])) take_q[own_q] = 1'b1;
    if (take_i == '0) begin
      for (int s = 3; s >= 0; s--)
        if (src_valid[s] && !take_q[s]) take_i = 4'(1) << s;
    end
    if (take_q == '0) begin
      for (int s = 3; s >= 0; s--)
        if (src_valid[s] && !take_i[s]) take_q = 4'(1) << s;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot      <= '0;
      bit_i     <= 1'b0;
      bit_q     <= 1'b0;
      src_ready <= '0;
    end else begin
      src_ready <= '0;
      if (bit_en) begin
        slot      <= (int'(slot) == N_SLOTS - 1) ? '0 : slot + 1'b1;
        bit_i     <= |(take_i & src_bit);
        bit_q     <= |(take_q & src_bit);
        src_ready <= take_i | take_q;
      end
    end
  end
endmodule
