// dl_ms_rx: mobile-terminal down-link receiver for one user.
//
// Chain: iq_demod_fs4 (IF at fs/4 -> I, Q at 32768 ksps), two half-band filters that
// decimate by 2 (16384 ksps), the AFC de-rotator (complex_mixer driven by an nco whose
// frequency comes from the fed loop), two root-raised-cosine matched filters (roll-off
// 0.313, 4 samples per chip), chip_sync (picks the chip phase, decimates by 4),
// frame_sync (finds the 10 ms frame from the pilot), local PN1/PN2 Gold generators
// and a Walsh generator restarted on each frame, channel_estimator (despreading of the pilot, which is PN1 itself),
// dl_cdma_demod (coherent despreading of the user's 4 QPSK channels) and
// channel_unmapper. This is the receive half of the down-link figure; the blocks and rates
// are the system's, widths and control ports are this design's.
//
// Operation: after reset the receiver searches for the frame start; once `locked` it waits
// for the next frame boundary to restart its local sequences (`active`), then produces an
// estimate and 8 channel bits per symbol (128 chips). The first symbol's decisions use a
// zero channel estimate and are not valid; `sym_valid` is suppressed for it.
module dl_ms_rx
  import cdma_pkg::*;
#(
  parameter int FRAME_CHIPS = cdma_pkg::FRAME_CHIPS,
  parameter int CORR_LEN    = 64,
  parameter int SYNC_WIN    = 256
) (
  input  logic              clk,
  input  logic              rst,
  input  conv_t             adc,
  input  logic [23:0]       thresh,
  input  logic              afc_en,
  input  logic [3:0]        ch_en,
  input  logic [3:0][4:0]   code,
  output logic              out_valid,
  output logic              out_bit,
  output logic              locked,
  output logic              active,
  output logic              frame_start,
  output logic              sym_valid,
  output logic [N_CH-1:0]   bits,
  output sample_t           h_i,
  output sample_t           h_q,
  output logic signed [31:0] freq,
  output logic [1:0]        chip_phase,
  output logic              frame_detect
);
  localparam int FCW = $clog2(FRAME_CHIPS);

  conv_t   di, dq;
  logic    hb_vi, hb_vq, mx_v, mf_vi, mf_vq, chip_valid;
  sample_t hb_i, hb_q, mx_i, mx_q, mf_i, mf_q, c_i, c_q;
  logic signed [11:0] nco_c, nco_s;
  logic signed [31:0] fed_freq, fed_err;
  logic [FCW-1:0] chip_idx;
  logic [23:0]    metric;

  iq_demod_fs4 u_iq (.clk, .rst, .din(adc), .out_i(di), .out_q(dq));

  fir_filter #(.SET(FIR_HB), .IW(DW), .OW(SW), .DECIM(2)) u_hb_i (
    .clk, .rst, .in_valid(1'b1), .din(di), .out_valid(hb_vi), .dout(hb_i));
  fir_filter #(.SET(FIR_HB), .IW(DW), .OW(SW), .DECIM(2)) u_hb_q (
    .clk, .rst, .in_valid(1'b1), .din(dq), .out_valid(hb_vq), .dout(hb_q));

  assign freq = afc_en ? fed_freq : '0;

  nco u_nco (.clk, .rst, .en(hb_vi), .freq(freq), .cos_o(nco_c), .sin_o(nco_s));

  complex_mixer u_mix (
    .clk, .rst, .in_valid(hb_vi), .in_i(hb_i), .in_q(hb_q), .cos_i(nco_c), .sin_i(nco_s),
    .out_valid(mx_v), .out_i(mx_i), .out_q(mx_q));

  fir_filter #(.SET(FIR_MF_DL), .IW(SW), .OW(SW), .DECIM(1)) u_mf_i (
    .clk, .rst, .in_valid(mx_v), .din(mx_i), .out_valid(mf_vi), .dout(mf_i));
  fir_filter #(.SET(FIR_MF_DL), .IW(SW), .OW(SW), .DECIM(1)) u_mf_q (
    .clk, .rst, .in_valid(mx_v), .din(mx_q), .out_valid(mf_vq), .dout(mf_q));

  chip_sync #(.SPC(4), .WIN(SYNC_WIN)) u_chip (
    .clk, .rst, .in_valid(mf_vi), .in_i(mf_i), .in_q(mf_q), .chip_valid, .chip_i(c_i),
    .chip_q(c_q), .phase(chip_phase));

  frame_sync #(.CORR_LEN(CORR_LEN), .FRAME_CHIPS(FRAME_CHIPS)) u_frame (
    .clk, .rst, .chip_valid, .chip_i(c_i), .chip_q(c_q), .thresh, .locked, .chip_idx,
    .frame_start, .detect(frame_detect), .metric);

  // Local sequences, restarted so that they show chip 0 together with chip_idx == 0.
  logic gen_en, gen_restart, pn1, pn2, l1, l2, sym_last;
  logic [WALSH_LEN-1:0] walsh;
  logic [4:0] walsh_idx;

  assign gen_en      = chip_valid && locked;
  assign gen_restart = gen_en && (chip_idx == FCW'(FRAME_CHIPS - 1));

  gold_gen #(.PERIOD(FRAME_CHIPS), .SEED_A(SEED_PN1)) u_pn1 (
    .clk, .rst, .en(gen_en), .restart(gen_restart), .chip(pn1), .last(l1));
  gold_gen #(.PERIOD(FRAME_CHIPS), .SEED_A(SEED_PN2)) u_pn2 (
    .clk, .rst, .en(gen_en), .restart(gen_restart), .chip(pn2), .last(l2));
  walsh_gen u_walsh (
    .clk, .rst, .chip_en(gen_en), .restart(gen_restart), .walsh, .walsh_idx, .sym_last);

  always_ff @(posedge clk) begin
    if (rst || !locked) active <= 1'b0;
    else if (gen_restart) active <= 1'b1;
  end

  logic est_valid, dm_valid, have_est;

  channel_estimator u_est (
    .clk, .rst, .chip_valid, .active, .sym_last, .chip_i(c_i), .chip_q(c_q), .pilot(pn1),
    .est_valid, .h_i, .h_q);

  fed u_fed (.clk, .rst, .est_valid, .h_i, .h_q, .freq(fed_freq), .err(fed_err));

  logic signed [3:0][23:0] soft_i, soft_q;

  dl_cdma_demod u_demod (
    .clk, .rst, .chip_valid, .active, .sym_last, .chip_i(c_i), .chip_q(c_q), .h_i, .h_q,
    .pn_i(pn1), .pn_q(pn2), .walsh, .code, .sym_valid(dm_valid), .bits, .soft_i, .soft_q);

  always_ff @(posedge clk) begin
    if (rst || !active) have_est <= 1'b0;
    else if (est_valid) have_est <= 1'b1;
  end
  assign sym_valid = dm_valid && have_est;

  channel_unmapper u_unmap (
    .clk, .rst, .sym_valid, .ch_bits(bits), .fill({ch_en, ch_en}), .out_valid, .out_bit);
endmodule
