// gold_gen: Gold sequence generator (PN1 and PN2 of the down link).
//
// Two Fibonacci LFSRs of degree DEG run in parallel; the chip is the XOR of their outputs
// (1 meaning -1). A recurrence a[n+DEG] = xor of a[n+i] over the set bits i of MASK is
// used for each register. The sequence is cut and restarted every PERIOD chips, which by
// default is the 10 ms frame (40960 chips at 4096 kchip/s) of the system. Polynomials and
// seeds are this design's choice (see cdma_pkg).
//
// Interface: `en` advances one chip; `restart` reloads the seeds so that the next chip is
// chip 0. `chip` is the current chip; `last` marks chip PERIOD-1.
module gold_gen
  import cdma_pkg::*;
#(
  parameter int              DEG    = DL_DEG,
  parameter logic [DEG-1:0]  MASK_A = DL_MASK_A,
  parameter logic [DEG-1:0]  MASK_B = DL_MASK_B,
  parameter logic [DEG-1:0]  SEED_A = SEED_PN1,
  parameter logic [DEG-1:0]  SEED_B = DL_SEED_B,
  parameter int              PERIOD = FRAME_CHIPS
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic restart,
  output logic chip,
  output logic last
);
  localparam int CW = $clog2(PERIOD + 1);
  logic [DEG-1:0] a, b;
  logic [CW-1:0]  cnt;

  always_ff @(posedge clk) begin
    if (rst || restart || (en && last)) begin
      a   <= SEED_A;
      b   <= SEED_B;
      cnt <= '0;
    end else if (en) begin
      a   <= {^(a & MASK_A), a[DEG-1:1]};
      b   <= {^(b & MASK_B), b[DEG-1:1]};
      cnt <= cnt + 1'b1;
    end
  end

  assign chip = a[0] ^ b[0];
  assign last = (cnt == CW'(PERIOD - 1));
endmodule
