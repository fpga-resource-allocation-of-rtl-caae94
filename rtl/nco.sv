// nco: numerically controlled oscillator giving cos and sin of a running phase.
//
// A 32-bit phase accumulator adds `freq` on every `en`; its top 8 bits address a 65-entry
// quarter-wave sine table (cdma_pkg::SIN_C, amplitude 2047) folded into a full cycle, and
// cos is sin advanced by a quarter turn. freq = 2^30 gives fs/4 (8192 kHz at 32768 ksps)
// exactly, with cos/sin = (2047,0), (0,2047), (-2047,0), (0,-2047). A signed `freq` around
// 0 serves the base-band AFC. The use of an NCO follows the system description; the widths
// and the table size are this design's choice.
//
// Timing: cos_o/sin_o are registered and belong to the phase before the last update; the
// accumulator starts at PHASE0 after reset.
module nco
  import cdma_pkg::*;
#(
  parameter logic [31:0] PHASE0 = 32'h0   // accumulator value after reset
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [31:0]        freq,
  output logic signed [11:0] cos_o,
  output logic signed [11:0] sin_o
);
  logic [31:0] acc;

  function automatic logic signed [11:0] sin_lut(logic [7:0] ph);
    logic [5:0] i;
    int v;
    i = ph[5:0];
    unique case (ph[7:6])
      2'd0: v = SIN_C[7'(i)];
      2'd1: v = SIN_C[64 - int'(i)];
      2'd2: v = -SIN_C[7'(i)];
      default: v = -SIN_C[64 - int'(i)];
    endcase
    return 12'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= PHASE0;
      cos_o <= 12'sd2047;
      sin_o <= '0;
    end else if (en) begin
      acc   <= acc + freq;
      sin_o <= sin_lut(acc[31:24]);
      cos_o <= sin_lut(acc[31:24] + 8'd64);
    end
  end
endmodule
