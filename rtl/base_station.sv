// base_station: the base-station part of the modem.
//
// One down-link transmitter for N_USERS users (dl_bs_tx) and, for each of N_RX up-link
// users, two receivers (ul_bs_rx, one per antenna) followed by a diversity selector. The
// receiver for user r despreads Gold code r. The system foresees 16 users and 16
// receivers; everything the base-station controller decides (codes, weights, pre-RAKE taps,
// thresholds, gains) enters as ports.
//
// Timing: one clock per 32768 ksps sample for all parts.
module base_station
  import cdma_pkg::*;
#(
  parameter int N_USERS     = cdma_pkg::N_USERS,
  parameter int N_RX        = 16,
  parameter int FRAME_CHIPS = cdma_pkg::FRAME_CHIPS
) (
  input  logic                                 clk,
  input  logic                                 rst,
  // down link
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
  output conv_t                                dac,
  output logic                                 frame_start,
  // up link, two antennas
  input  conv_t                                adc_a,
  input  conv_t                                adc_b,
  input  logic [23:0]                          ul_thresh,
  output logic [N_RX-1:0]                      rx_valid,
  output logic [N_RX-1:0]                      rx_bit_i,
  output logic [N_RX-1:0]                      rx_bit_q,
  output logic [N_RX-1:0]                      rx_sel,
  output logic [N_RX-1:0]                      rx_switched,
  output logic [N_RX-1:0][1:0]                 rx_locked,
  output logic [N_RX-1:0][1:0][31:0]           rx_power,
  output logic [N_RX-1:0][1:0]                 rx_lock_event,
  output logic [N_RX-1:0][1:0]                 rx_track_step
);
  logic sym_strobe;

  dl_bs_tx #(.N_USERS(N_USERS), .FRAME_CHIPS(FRAME_CHIPS)) u_dl_tx (
    .clk, .rst, .user_valid, .user_bit, .user_ready, .ch_en, .code, .coef_i, .coef_q, .weight,
    .pich_gain, .bpch_gain, .bpch_code, .bpch_bit, .dac, .frame_start, .sym_strobe);

  for (genvar r = 0; r < N_RX; r++) begin : g_rx
    logic va, vb, ia, ib, qa, qb, pva, pvb;
    logic [7:0] oa, ob;

    ul_bs_rx #(.USER(r)) u_rx_a (
      .clk, .rst, .adc(adc_a), .thresh(ul_thresh), .bit_valid(va), .bit_i(ia), .bit_q(qa),
      .locked(rx_locked[r][0]), .offset(oa), .power(rx_power[r][0]), .power_valid(pva),
      .lock_event(rx_lock_event[r][0]), .track_step(rx_track_step[r][0]));
    ul_bs_rx #(.USER(r)) u_rx_b (
      .clk, .rst, .adc(adc_b), .thresh(ul_thresh), .bit_valid(vb), .bit_i(ib), .bit_q(qb),
      .locked(rx_locked[r][1]), .offset(ob), .power(rx_power[r][1]), .power_valid(pvb),
      .lock_event(rx_lock_event[r][1]), .track_step(rx_track_step[r][1]));

    diversity_select u_div (
      .clk, .rst,
      .a_valid(va), .a_bit_i(ia), .a_bit_q(qa), .a_locked(rx_locked[r][0]), .a_power(rx_power[r][0]),
      .b_valid(vb), .b_bit_i(ib), .b_bit_q(qb), .b_locked(rx_locked[r][1]), .b_power(rx_power[r][1]),
      .sel(rx_sel[r]), .switched(rx_switched[r]), .bit_valid(rx_valid[r]), .bit_i(rx_bit_i[r]),
      .bit_q(rx_bit_q[r]));
  end
endmodule
