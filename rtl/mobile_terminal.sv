// mobile_terminal: the mobile part of the modem.
//
// The down-link receiver (dl_ms_rx) for the terminal's own channels and the up-link
// transmitter (ul_ms_tx) spreading with Gold code USER. The services' encoders and the
// terminal controller are outside; their bit streams and settings are ports.
//
// Timing: one clock per 32768 ksps sample.
module mobile_terminal
  import cdma_pkg::*;
#(
  parameter int USER        = 0,
  parameter int FRAME_CHIPS = cdma_pkg::FRAME_CHIPS
) (
  input  logic              clk,
  input  logic              rst,
  // down link
  input  conv_t             adc,
  input  logic [23:0]       dl_thresh,
  input  logic              afc_en,
  input  logic [3:0]        ch_en,
  input  logic [3:0][4:0]   code,
  output logic              dl_valid,
  output logic              dl_bit,
  output logic              dl_locked,
  output logic              dl_active,
  output logic              dl_frame_start,
  output logic              dl_sym_valid,
  output logic [N_CH-1:0]   dl_bits,
  output sample_t           h_i,
  output sample_t           h_q,
  output logic signed [31:0] afc_freq,
  output logic [1:0]        chip_phase,
  output logic              frame_detect,
  // up link
  input  logic [3:0]        src_valid,
  input  logic [3:0]        src_bit,
  output logic [3:0]        src_ready,
  input  logic [10:0]       ul_amp,
  input  logic [31:0]       ul_freq,
  output conv_t             dac,
  output logic              ul_bit_start,
  output logic              ul_bit_i,
  output logic              ul_bit_q
);
  dl_ms_rx #(.FRAME_CHIPS(FRAME_CHIPS)) u_dl_rx (
    .clk, .rst, .adc, .thresh(dl_thresh), .afc_en, .ch_en, .code, .out_valid(dl_valid),
    .out_bit(dl_bit), .locked(dl_locked), .active(dl_active), .frame_start(dl_frame_start),
    .sym_valid(dl_sym_valid), .bits(dl_bits), .h_i, .h_q, .freq(afc_freq), .chip_phase,
    .frame_detect);

  ul_ms_tx #(.USER(USER)) u_ul_tx (
    .clk, .rst, .src_valid, .src_bit, .src_ready, .amp(ul_amp), .freq(ul_freq), .dac,
    .bit_start(ul_bit_start), .bit_i(ul_bit_i), .bit_q(ul_bit_q));
endmodule
