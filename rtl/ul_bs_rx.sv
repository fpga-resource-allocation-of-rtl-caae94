// ul_bs_rx: base-station up-link receiver for one user on one antenna.
//
// Chain: iq_demod_fs4 (IF at fs/4 -> I, Q), two root-raised-cosine matched filters
// (roll-off 0.5) at the full 32768 ksps rate (8 samples per chip), the correlator bank of
// ul_cdma_demod, ul_sync_acq (serial code search) and ul_sync_track (early-late loop).
// No RAKE is used, the indoor channel having no significant multipath. USER selects the
// user's Gold code. The chain is the receiver of the up-link figure; the arithmetic is
// this design's.
//
// Timing: bit decisions come once per bit (256 clocks) with `bit_valid` while locked.
module ul_bs_rx
  import cdma_pkg::*;
#(
  parameter int USER = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  conv_t       adc,
  input  logic [23:0] thresh,
  output logic        bit_valid,
  output logic        bit_i,
  output logic        bit_q,
  output logic        locked,
  output logic [7:0]  offset,
  output logic [31:0] power,
  output logic        power_valid,
  output logic        lock_event,
  output logic        track_step
);
  conv_t   di, dq;
  sample_t mi, mq;
  logic    vi, vq, dump, inc, dec, loss_event;
  logic signed [23:0] p_i, p_q;
  logic [23:0] p_en, e_en, l_en;

  iq_demod_fs4 u_iq (.clk, .rst, .din(adc), .out_i(di), .out_q(dq));

  fir_filter #(.SET(FIR_MF_UL), .IW(DW), .OW(SW), .DECIM(1)) u_mf_i (
    .clk, .rst, .in_valid(1'b1), .din(di), .out_valid(vi), .dout(mi));
  fir_filter #(.SET(FIR_MF_UL), .IW(DW), .OW(SW), .DECIM(1)) u_mf_q (
    .clk, .rst, .in_valid(1'b1), .din(dq), .out_valid(vq), .dout(mq));

  ul_cdma_demod #(.USER(USER)) u_demod (
    .clk, .rst, .in_i(mi), .in_q(mq), .offset, .dump, .p_i, .p_q, .p_en, .e_en, .l_en,
    .bit_i, .bit_q, .power, .power_valid);

  ul_sync_acq u_acq (
    .clk, .rst, .dump, .energy(p_en), .thresh, .inc, .dec, .offset, .locked, .lock_event,
    .loss_event);

  ul_sync_track u_track (.clk, .rst, .locked, .dump, .e_en, .l_en, .inc, .dec);

  // Decisions of a period belong to the state the receiver had during it.
  always_ff @(posedge clk) begin
    if (rst) bit_valid <= 1'b0;
    else     bit_valid <= dump && locked;
  end

  assign track_step = inc | dec;
endmodule
