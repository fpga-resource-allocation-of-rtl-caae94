// ul_sync_track: early-late code tracking of the up-link receiver.
//
// While the receiver is locked, the module sums early-minus-late energy over AVG code
// periods. If the early correlator (2 samples before the assumed chip centre) is stronger
// by more than 1/16 of their total, the signal arrives earlier than assumed and `dec`
// moves the code offset back one sample; if the late one is stronger, `inc` moves it
// forward. The tracking task is the system's; the early-late rule, spacing and averaging
// are this design's.
//
// Timing: inc/dec are one-clock pulses on the clock of the AVG-th `dump`.
module ul_sync_track
  import cdma_pkg::*;
#(
  parameter int AVG = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        locked,
  input  logic        dump,
  input  logic [23:0] e_en,
  input  logic [23:0] l_en,
  output logic        inc,
  output logic        dec
);
  localparam int AW = 24 + $clog2(AVG) + 1;
  logic signed [AW-1:0] diff, nd;
  logic [AW-1:0]        tot, nt;
  logic [$clog2(AVG)-1:0] cnt;

  assign nd = diff + AW'(e_en) - AW'(l_en);
  assign nt = tot + AW'(e_en) + AW'(l_en);

  always_ff @(posedge clk) begin
    if (rst || !locked) begin
      diff <= '0;
      tot  <= '0;
      cnt  <= '0;
      inc  <= 1'b0;
      dec  <= 1'b0;
    end else begin
      inc <= 1'b0;
      dec <= 1'b0;
      if (dump) begin
        if (int'(cnt) == AVG - 1) begin
          cnt  <= '0;
          diff <= '0;
          tot  <= '0;
          if (nd > $signed(nt >> 4)) dec <= 1'b1;
          else if (-nd > $signed(nt >> 4)) inc <= 1'b1;
        end else begin
          cnt  <= cnt + 1'b1;
          diff <= nd;
          tot  <= nt;
        end
      end
    end
  end
endmodule
