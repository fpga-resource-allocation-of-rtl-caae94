// iq_demod_fs4: separates I and Q from a real IF at a quarter of the sample rate.
//
// The receivers sample at 32768 ksps with the signal at fs/4 (8192 kHz). Multiplying by
// cos = 1, 0, -1, 0 and by -sin = 0, -1, 0, 1 needs only sign changes: I takes the even
// samples (+x, -x) and Q the odd ones (-x, +x), the other samples being zero. The
// following low-pass filter (half-band or matched filter) fills the gaps; its table
// carries the factor of 2 this costs. It is the exact inverse of iq_mod_fs4 when both
// carrier counters agree. The IF and sample rate are the system's.
//
// Timing: one sample per clock in and out, one clock of latency.
module iq_demod_fs4
  import cdma_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  conv_t din,
  output conv_t out_i,
  output conv_t out_q
);
  logic [1:0] ph;
  conv_t      neg;

  assign neg = DW'(sat(-longint'(din), DW));

  always_ff @(posedge clk) begin
    if (rst) begin
      ph    <= '0;
      out_i <= '0;
      out_q <= '0;
    end else begin
      ph <= ph + 2'd1;
      unique case (ph)
        2'd0: begin out_i <= din; out_q <= '0;  end
        2'd1: begin out_i <= '0;  out_q <= neg; end
        2'd2: begin out_i <= neg; out_q <= '0;  end
        default: begin out_i <= '0; out_q <= din; end
      endcase
    end
  end
endmodule
