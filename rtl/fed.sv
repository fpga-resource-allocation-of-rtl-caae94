// fed: frequency error detector and loop integrator of the down-link AFC.
//
// A residual frequency offset turns successive pilot estimates by a constant angle. The
// detector forms the cross product e = I[n-1] Q[n] - Q[n-1] I[n] (proportional to the
// sine of that angle) and the loop integrates it, freq += e >>> KSHIFT, into the NCO
// increment of the base-band de-rotator. Before two estimates exist, e is not formed. The
// FED/NCO loop is the system's; the cross-product detector and first-order loop are this
// design's choice.
//
// Timing: `freq` updates one clock after `est_valid`; `err` shows the last detector output.
module fed
  import cdma_pkg::*;
#(
  parameter int KSHIFT = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               est_valid,
  input  sample_t            h_i,
  input  sample_t            h_q,
  output logic signed [31:0] freq,
  output logic signed [31:0] err
);
  sample_t p_i, p_q;
  logic    have_prev;
  logic signed [32:0] e;

  assign e = 33'(p_i * h_q) - 33'(p_q * h_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      p_i       <= '0;
      p_q       <= '0;
      have_prev <= 1'b0;
      freq      <= '0;
      err       <= '0;
    end else if (est_valid) begin
      p_i       <= h_i;
      p_q       <= h_q;
      have_prev <= 1'b1;
      if (have_prev) begin
        err  <= 32'(sat(longint'(e), 32));
        freq <= freq + 32'(sat((longint'(e) >>> KSHIFT), 32));
      end
    end
  end
endmodule
