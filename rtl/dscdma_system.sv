// dscdma_system: DS-CDMA indoor modem, base station and one mobile terminal.
//
// The two ends of the radio link side by side. The base station sends up to 16 users on
// the down link (Walsh channelisation, Gold scrambling, pre-RAKE, pilot and broadcast
// channels, IF at 8192 kHz, 32768 ksps) and receives the up link of up to 16 users with
// two antennas each (Gold code acquisition and tracking, selection diversity). The mobile
// receives its down-link channels (AFC, chip/frame synchronisation, pilot channel
// estimation, coherent despreading) and sends its services on the up link (TDM, Gold
// spreading, shaping, IF modulation with an NCO). DACs, RF and ADCs are outside: the
// base-station DAC output `bs_dac`, the mobile DAC output `ms_dac`, and the ADC inputs
// `ms_adc`, `bs_adc_a`, `bs_adc_b` are ports, so a channel model can close the loop.
//
// Timing: a single clock at the 32768 ksps sample rate; synchronous active-high reset.
module dscdma_system
  import cdma_pkg::*;
#(
  parameter int N_USERS     = cdma_pkg::N_USERS,
  parameter int N_RX        = 16,
  parameter int FRAME_CHIPS = cdma_pkg::FRAME_CHIPS,
  parameter int MS_USER     = 0
) (
  input  logic                                 clk,
  input  logic                                 rst,
  // ---- base station: down-link transmitter
  input  logic [N_USERS-1:0]                   user_valid,
  input  logic [N_USERS-1:0]                   user_bit,
  output logic [N_USERS-1:0]                   user_ready,
  input  logic [N_USERS-1:0][3:0]              ch_en,
  input  logic [N_USERS-1:0][3:0][4:0]         code,
  input  logic signed [N_USERS-1:0][1:0][7:0]  coef_i,
  input  logic signed [N_USERS-1:0][1:0][7:0]  coef_q,
  input  logic [N_USERS-1:0][7:0]              weight,
  input  logic [10:0]                          pich_gain,
  input  logic [10:0]                          bpch_gain,
  input  logic [4:0]                           bpch_code,
  input  logic                                 bpch_bit,
  output conv_t                                bs_dac,
  output logic                                 bs_frame_start,
  // ---- base station: up-link receivers
  input  conv_t                                bs_adc_a,
  input  conv_t                                bs_adc_b,
  input  logic [23:0]                          ul_thresh,
  output logic [N_RX-1:0]                      rx_valid,
  output logic [N_RX-1:0]                      rx_bit_i,
  output logic [N_RX-1:0]                      rx_bit_q,
  output logic [N_RX-1:0]                      rx_sel,
  output logic [N_RX-1:0]                      rx_switched,
  output logic [N_RX-1:0][1:0]                 rx_locked,
  output logic [N_RX-1:0][1:0][31:0]           rx_power,
  output logic [N_RX-1:0][1:0]                 rx_lock_event,
  output logic [N_RX-1:0][1:0]                 rx_track_step,
  // ---- mobile: down-link receiver
  input  conv_t                                ms_adc,
  input  logic [23:0]                          dl_thresh,
  input  logic                                 afc_en,
  input  logic [3:0]                           ms_ch_en,
  input  logic [3:0][4:0]                      ms_code,
  output logic                                 dl_valid,
  output logic                                 dl_bit,
  output logic                                 dl_locked,
  output logic                                 dl_active,
  output logic                                 dl_frame_start,
  output logic                                 dl_sym_valid,
  output logic [N_CH-1:0]                      dl_bits,
  output sample_t                              dl_h_i,
  output sample_t                              dl_h_q,
  output logic signed [31:0]                   afc_freq,
  output logic [1:0]                           chip_phase,
  output logic                                 frame_detect,
  // ---- mobile: up-link transmitter
  input  logic [3:0]                           src_valid,
  input  logic [3:0]                           src_bit,
  output logic [3:0]                           src_ready,
  input  logic [10:0]                          ul_amp,
  input  logic [31:0]                          ul_freq,
  output conv_t                                ms_dac,
  output logic                                 ul_bit_start,
  output logic                                 ul_bit_i,
  output logic                                 ul_bit_q
);
  base_station #(.N_USERS(N_USERS), .N_RX(N_RX), .FRAME_CHIPS(FRAME_CHIPS)) u_bs (
    .clk, .rst, .user_valid, .user_bit, .user_ready, .ch_en, .code, .coef_i, .coef_q,
    .weight, .pich_gain, .bpch_gain, .bpch_code, .bpch_bit, .dac(bs_dac),
    .frame_start(bs_frame_start), .adc_a(bs_adc_a), .adc_b(bs_adc_b), .ul_thresh, .rx_valid,
    .rx_bit_i, .rx_bit_q, .rx_sel, .rx_switched, .rx_locked, .rx_power, .rx_lock_event,
    .rx_track_step);

  mobile_terminal #(.USER(MS_USER), .FRAME_CHIPS(FRAME_CHIPS)) u_ms (
    .clk, .rst, .adc(ms_adc), .dl_thresh, .afc_en, .ch_en(ms_ch_en), .code(ms_code),
    .dl_valid, .dl_bit, .dl_locked, .dl_active, .dl_frame_start, .dl_sym_valid, .dl_bits,
    .h_i(dl_h_i), .h_q(dl_h_q), .afc_freq, .chip_phase, .frame_detect, .src_valid, .src_bit,
    .src_ready, .ul_amp, .ul_freq, .dac(ms_dac), .ul_bit_start, .ul_bit_i, .ul_bit_q);
endmodule
