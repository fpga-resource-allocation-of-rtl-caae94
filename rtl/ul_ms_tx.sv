// ul_ms_tx: mobile-terminal up-link transmitter.
//
// The multiplexer packs the terminal's services into two 128 kbit/s bits (I, Q); each bit
// is spread by the user's 32-chip Gold code (cdma_pkg::ul_code, processing gain 32, 4096
// kchip/s), mapped to +-amp, interpolated by 8 and shaped by root-raised-cosine filters
// (roll-off 0.5) and finally modulated onto the IF by iq_mod_nco at 32768 ksps. One code
// period is exactly one bit. Structure and rates follow the system's up-link transmitter;
// the short (one-bit) code, widths and control ports are this design's choice.
//
// Timing: chips last 8 clocks and bits 256 clocks, counted from reset. `bit_start` pulses
// on the clock where a new pair of bits is loaded.
module ul_ms_tx
  import cdma_pkg::*;
#(
  parameter int USER = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  src_valid,
  input  logic [3:0]  src_bit,
  output logic [3:0]  src_ready,
  input  logic [10:0] amp,
  input  logic [31:0] freq,
  output conv_t       dac,
  output logic        bit_start,
  output logic        bit_i,
  output logic        bit_q
);
  localparam logic [31:0] CODE = ul_code(USER);

  logic [2:0] sub;
  logic [4:0] chip;
  logic       chip_en;
  logic [2:0] slot;
  conv_t      ci, cq, fi, fq;

  assign chip_en   = (sub == 3'd7);
  assign bit_start = chip_en && (chip == 5'd31);

  always_ff @(posedge clk) begin
    if (rst) begin
      sub  <= '0;
      chip <= 5'd31;
    end else begin
      sub <= sub + 3'd1;
      if (chip_en) chip <= chip + 5'd1;
    end
  end

  ul_multiplexer u_mux (
    .clk, .rst, .bit_en(bit_start), .src_valid, .src_bit, .src_ready, .bit_i, .bit_q, .slot);

  // Spread chip: `chip` is the position of the chip the shaping filter takes on this
  // chip_en, and bit_i/bit_q still hold its bit (they change on the same edge).
  assign ci = (bit_i ^ CODE[chip]) ? -DW'(amp) : DW'(amp);
  assign cq = (bit_q ^ CODE[chip]) ? -DW'(amp) : DW'(amp);

  shaping_filter #(.SET(FIR_TX_UL)) u_shape_i (.clk, .rst, .chip_en, .din(ci), .dout(fi));
  shaping_filter #(.SET(FIR_TX_UL)) u_shape_q (.clk, .rst, .chip_en, .din(cq), .dout(fq));

  iq_mod_nco u_mod (.clk, .rst, .in_i(fi), .in_q(fq), .freq, .dout(dac));
endmodule
