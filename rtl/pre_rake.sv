// pre_rake: per-user pre-RAKE and amplitude weight of the down-link transmitter.
//
// The base station sends the same signal from two antennas with a delay of a few chips so
// the mobile sees a two-path channel. Instead of a RAKE in the mobile, the transmitter
// pre-distorts each user: y[n] = w * sum_l c_l * x[n - l*TAP_DELAY], where the complex taps
// c_l are the conjugated channel estimates in reversed path order (supplied by the control
// processor) and w is the user's power-control weight. The use of a pre-RAKE and a weight
// follows the system description; the tap count, spacing and widths are this design's.
//
// Scaling: taps are signed Q7 (127 ~ 1.0), w is unsigned with 64 = 1.0, so a single unit
// chip with c_0 = 127 and w = 64 gives 127. Output saturates to 16 bits.
// Timing: registered on `chip_en`, one chip of latency plus the tap delays.
module pre_rake
  import cdma_pkg::*;
#(
  parameter int N_TAPS    = 2,
  parameter int TAP_DELAY = 2
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          chip_en,
  input  logic signed [3:0]             in_i,
  input  logic signed [3:0]             in_q,
  input  logic signed [N_TAPS-1:0][7:0] coef_i,
  input  logic signed [N_TAPS-1:0][7:0] coef_q,
  input  logic [7:0]                    weight,
  output sample_t                       out_i,
  output sample_t                       out_q
);
  localparam int DEPTH = (N_TAPS - 1) * TAP_DELAY + 1;
  logic signed [3:0] dl_i [DEPTH];
  logic signed [3:0] dl_q [DEPTH];
  logic signed [3:0] x_i [DEPTH];
  logic signed [3:0] x_q [DEPTH];
  logic signed [15:0] acc_i, acc_q;
  logic signed [25:0] w_i, w_q;

  // x[d] is the chip d chip periods before the one now on the input.
  always_comb begin
    x_i[0] = in_i;
    x_q[0] = in_q;
    for (int d = 1; d < DEPTH; d++) begin
      x_i[d] = dl_i[d-1];
      x_q[d] = dl_q[d-1];
    end
  end

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int l = 0; l < N_TAPS; l++) begin
      acc_i = acc_i + 16'(x_i[l*TAP_DELAY] * $signed(coef_i[l]))
                    - 16'(x_q[l*TAP_DELAY] * $signed(coef_q[l]));
      acc_q = acc_q + 16'(x_i[l*TAP_DELAY] * $signed(coef_q[l]))
                    + 16'(x_q[l*TAP_DELAY] * $signed(coef_i[l]));
    end
    w_i = acc_i * $signed({1'b0, weight});
    w_q = acc_q * $signed({1'b0, weight});
  end

  // dl[0] holds the previous input chip; the output registered on chip_en includes the
  // chip on the input at that moment.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < DEPTH; d++) begin
        dl_i[d] <= '0;
        dl_q[d] <= '0;
      end
      out_i <= '0;
      out_q <= '0;
    end else if (chip_en) begin
      dl_i[0] <= in_i;
      dl_q[0] <= in_q;
      for (int d = 1; d < DEPTH; d++) begin
        dl_i[d] <= dl_i[d-1];
        dl_q[d] <= dl_q[d-1];
      end
      out_i <= SW'(sat((longint'(w_i) >>> 6), SW));
      out_q <= SW'(sat((longint'(w_q) >>> 6), SW));
    end
  end
endmodule
