// ul_sync_acq: code acquisition of the asynchronous up link (serial search).
//
// The mobile's code phase at the base station is unknown, to the sample. While searching,
// the module holds a hypothesis `offset` (0..255 samples, i.e. 32 chips x 8 samples) and
// dwells one code period on it: at each `dump` of the correlators, a prompt energy above
// `thresh` locks the receiver, anything else moves the hypothesis one sample earlier (a step back
// also makes the next period start at once, so every dwell is a full period). When
// locked, the tracking loop moves the offset with `inc`/`dec`, and MAX_MISS consecutive
// periods below half the threshold return the receiver to the search. Acquisition of the
// code is the system's; serial search, step and lock rules are this design's.
//
// Timing: offset and state change on the clock of `dump`.
module ul_sync_acq
  import cdma_pkg::*;
#(
  parameter int MAX_MISS = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dump,
  input  logic [23:0] energy,
  input  logic [23:0] thresh,
  input  logic        inc,
  input  logic        dec,
  output logic [7:0]  offset,
  output logic        locked,
  output logic        lock_event,
  output logic        loss_event
);
  logic [3:0] miss;

  assign lock_event = dump && !locked && (energy > thresh);
  assign loss_event = dump && locked && (energy <= (thresh >> 1)) && (int'(miss) == MAX_MISS - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      offset <= '0;
      locked <= 1'b0;
      miss   <= '0;
    end else if (!locked) begin
      if (dump) begin
        if (energy > thresh) begin
          locked <= 1'b1;
          miss   <= '0;
        end else begin
          offset <= offset - 8'd1;
        end
      end
    end else begin
      if (inc) offset <= offset + 8'd1;
      else if (dec) offset <= offset - 8'd1;
      if (dump) begin
        if (energy > (thresh >> 1)) miss <= '0;
        else if (int'(miss) == MAX_MISS - 1) begin
          locked <= 1'b0;
          miss   <= '0;
        end else miss <= miss + 4'd1;
      end
    end
  end
endmodule
