// frame_sync: 10 ms frame synchronisation of the down-link receiver, from the pilot.
//
// The pilot channel carries the I scrambling sequence PN1 unmodulated; it restarts every
// frame. The last
// CORR_LEN received chips are kept in a shift register and correlated, I and Q apart,
// with the first CORR_LEN chips of the pilot sequence (a constant computed by
// cdma_pkg::dl_prefix). The metric |corr_I| + |corr_Q| does not depend on the carrier
// phase. While searching, a metric above `thresh` means the frame began CORR_LEN chips
// ago: the module locks and from then on counts chips modulo FRAME_CHIPS. It re-checks the
// metric at the same point of every frame and drops the lock after MAX_MISS consecutive
// misses. Frame synchronisation from the received chips is the system's; the correlator
// and the threshold input are this design's choice.
//
// Interface/timing: inputs are the chips of chip_sync. `chip_idx` is the index in the frame
// of the chip now on the input, valid while `locked`; `frame_start` is high with
// `chip_valid` on chip 0. `detect` pulses when the correlator fires.
module frame_sync
  import cdma_pkg::*;
#(
  parameter int CORR_LEN    = 64,
  parameter int FRAME_CHIPS = cdma_pkg::FRAME_CHIPS,
  parameter int MAX_MISS    = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        chip_valid,
  input  sample_t     chip_i,
  input  sample_t     chip_q,
  input  logic [23:0] thresh,
  output logic        locked,
  output logic [$clog2(FRAME_CHIPS)-1:0] chip_idx,
  output logic        frame_start,
  output logic        detect,
  output logic [23:0] metric
);
  localparam int FCW = $clog2(FRAME_CHIPS);
  localparam logic [63:0] REF = dl_prefix(SEED_PN1, CORR_LEN);

  sample_t sr_i [CORR_LEN];
  sample_t sr_q [CORR_LEN];
  logic signed [23:0] ci, cq;
  logic [1:0] miss;
  logic       hit;

  // sr[j] holds the chip received j+1 chips ago, i.e. pilot chip CORR_LEN-1-j.
  always_comb begin
    ci = '0;
    cq = '0;
    for (int j = 0; j < CORR_LEN; j++) begin
      ci = ci + (REF[CORR_LEN-1-j] ? -24'(sr_i[j]) : 24'(sr_i[j]));
      cq = cq + (REF[CORR_LEN-1-j] ? -24'(sr_q[j]) : 24'(sr_q[j]));
    end
    metric = (ci[23] ? -ci : ci) + (cq[23] ? -cq : cq);
  end

  assign hit         = (metric > thresh);
  assign detect      = chip_valid && hit && !locked;
  assign frame_start = chip_valid && locked && (chip_idx == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < CORR_LEN; j++) begin
        sr_i[j] <= '0;
        sr_q[j] <= '0;
      end
      locked   <= 1'b0;
      chip_idx <= '0;
      miss     <= '0;
    end else if (chip_valid) begin
      sr_i[0] <= chip_i;
      sr_q[0] <= chip_q;
      for (int j = 1; j < CORR_LEN; j++) begin
        sr_i[j] <= sr_i[j-1];
        sr_q[j] <= sr_q[j-1];
      end
      if (!locked) begin
        if (hit) begin
          locked   <= 1'b1;
          chip_idx <= FCW'(CORR_LEN + 1);
          miss     <= '0;
        end
      end else begin
        chip_idx <= (chip_idx == FCW'(FRAME_CHIPS - 1)) ? '0 : chip_idx + 1'b1;
        if (chip_idx == FCW'(CORR_LEN)) begin
          if (hit) miss <= '0;
          else if (int'(miss) == MAX_MISS - 1) locked <= 1'b0;
          else miss <= miss + 2'd1;
        end
      end
    end
  end
endmodule
