// dl_bs_tx: base-station down-link transmitter for up to 16 users.
//
// Chain per user: channel_mapper (bit stream -> 8 channel bits per symbol), user_spreader
// (Walsh x PN1/PN2, 4+4 channel adder), pre_rake (pre-RAKE taps and power weight). All
// users meet in dl_tx_combiner together with the pilot (PICH: the I scrambling sequence
// PN1 sent without data, i.e. Walsh code 0, so it is orthogonal to the traffic channels)
// and the broadcast/paging channel (BPCH, Walsh code `bpch_code`); the I and Q chip streams are shaped by x8 root-raised-cosine filters
// (roll-off 0.313) and up-converted to 8192 kHz by iq_mod_fs4 for the DAC at 32768 ksps.
// This is the transmit half of the down-link figure; the structure is the system's, the
// widths and control ports are this design's.
//
// Timing: one clock per output sample; a chip is 8 clocks. Frame, symbol and Walsh
// counters are common to all users: the frame (10 ms, FRAME_CHIPS chips) starts after
// reset, PN1 and PN2 restart with it and `frame_start` pulses on its first
// chip. Each user's bits are taken one symbol (128 chips) ahead of their transmission.
// The pilot and BPCH chips are delayed by the two chips that spreading and pre-RAKE take,
// so every channel leaves the combiner aligned to the same frame timing.
module dl_bs_tx
  import cdma_pkg::*;
#(
  parameter int N_USERS     = cdma_pkg::N_USERS,
  parameter int FRAME_CHIPS = cdma_pkg::FRAME_CHIPS,
  parameter int N_TAPS      = 2,
  parameter int TAP_DELAY   = 2
) (
  input  logic                                  clk,
  input  logic                                  rst,
  // user bit streams
  input  logic [N_USERS-1:0]                    user_valid,
  input  logic [N_USERS-1:0]                    user_bit,
  output logic [N_USERS-1:0]                    user_ready,
  // per-user configuration from the base-station controller
  input  logic [N_USERS-1:0][3:0]               ch_en,
  input  logic [N_USERS-1:0][3:0][4:0]          code,
  input  logic signed [N_USERS-1:0][N_TAPS-1:0][7:0] coef_i,
  input  logic signed [N_USERS-1:0][N_TAPS-1:0][7:0] coef_q,
  input  logic [N_USERS-1:0][7:0]               weight,
  // common channels
  input  logic [10:0]                           pich_gain,
  input  logic [10:0]                           bpch_gain,
  input  logic [4:0]                            bpch_code,
  input  logic                                  bpch_bit,
  // to the DAC
  output conv_t                                 dac,
  output logic                                  frame_start,
  output logic                                  sym_strobe
);
  localparam int FCW = $clog2(FRAME_CHIPS);

  logic [2:0]     sub;
  logic           chip_en;
  logic [FCW-1:0] cidx;
  logic           pn1, pn2, pn1_last, pn2_last;
  logic [WALSH_LEN-1:0] walsh;
  logic [4:0]     walsh_idx;
  logic           sym_last, frame_last;
  logic           bpch_sym;

  assign chip_en    = (sub == 3'd7);
  assign frame_last = (cidx == FCW'(FRAME_CHIPS - 1));
  assign sym_strobe = chip_en && sym_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      sub  <= '0;
      cidx <= '0;
    end else begin
      sub <= sub + 3'd1;
      if (chip_en) cidx <= frame_last ? '0 : cidx + 1'b1;
    end
  end

  gold_gen #(.PERIOD(FRAME_CHIPS), .SEED_A(SEED_PN1)) u_pn1 (
    .clk, .rst, .en(chip_en), .restart(chip_en && frame_last), .chip(pn1), .last(pn1_last));
  gold_gen #(.PERIOD(FRAME_CHIPS), .SEED_A(SEED_PN2)) u_pn2 (
    .clk, .rst, .en(chip_en), .restart(chip_en && frame_last), .chip(pn2), .last(pn2_last));
  walsh_gen u_walsh (
    .clk, .rst, .chip_en, .restart(chip_en && frame_last), .walsh, .walsh_idx, .sym_last);

  // frame_start marks the chip with index 0 as it leaves the combiner (3 chips later).
  logic [2:0] fs_pipe;
  always_ff @(posedge clk) begin
    if (rst) fs_pipe <= '0;
    else if (chip_en) fs_pipe <= {fs_pipe[1:0], (cidx == '0)};
  end
  assign frame_start = chip_en && fs_pipe[2];

  // BPCH bit held for a symbol, loaded with the users' bits.
  always_ff @(posedge clk) begin
    if (rst) bpch_sym <= 1'b0;
    else if (sym_strobe) bpch_sym <= bpch_bit;
  end

  // Pilot and BPCH chips delayed by the 2-chip user pipeline.
  logic [1:0] d_pilot, d_bi, d_bq;
  always_ff @(posedge clk) begin
    if (rst) begin
      d_pilot <= '0;
      d_bi    <= '0;
      d_bq    <= '0;
    end else if (chip_en) begin
      d_pilot <= {d_pilot[0], pn1};
      d_bi    <= {d_bi[0], bpch_sym ^ walsh[bpch_code] ^ pn1};
      d_bq    <= {d_bq[0], bpch_sym ^ walsh[bpch_code] ^ pn2};
    end
  end

  sample_t ui [N_USERS];
  sample_t uq [N_USERS];

  for (genvar u = 0; u < N_USERS; u++) begin : g_user
    logic [N_CH-1:0]   ch_bits, ch_fill;
    logic signed [3:0] si, sq;

    channel_mapper u_map (
      .clk, .rst, .in_valid(user_valid[u]), .in_bit(user_bit[u]), .in_ready(user_ready[u]),
      .sym_strobe, .ch_bits, .ch_fill);
    user_spreader u_spread (
      .clk, .rst, .chip_en, .ch_bits, .ch_en(ch_en[u]), .walsh, .code(code[u]),
      .pn_i(pn1), .pn_q(pn2), .out_i(si), .out_q(sq));
    pre_rake #(.N_TAPS(N_TAPS), .TAP_DELAY(TAP_DELAY)) u_prerake (
      .clk, .rst, .chip_en, .in_i(si), .in_q(sq), .coef_i(coef_i[u]), .coef_q(coef_q[u]),
      .weight(weight[u]), .out_i(ui[u]), .out_q(uq[u]));
  end

  conv_t ci, cq, fi, fq;

  dl_tx_combiner #(.N_USERS(N_USERS)) u_comb (
    .clk, .rst, .chip_en, .user_i(ui), .user_q(uq), .pich_chip(d_pilot[1]),
    .bpch_chip_i(d_bi[1]), .bpch_chip_q(d_bq[1]), .pich_gain, .bpch_gain,
    .out_i(ci), .out_q(cq));

  shaping_filter #(.SET(FIR_TX_DL)) u_shape_i (.clk, .rst, .chip_en, .din(ci), .dout(fi));
  shaping_filter #(.SET(FIR_TX_DL)) u_shape_q (.clk, .rst, .chip_en, .din(cq), .dout(fq));

  iq_mod_fs4 u_mod (.clk, .rst, .in_i(fi), .in_q(fq), .dout(dac));
endmodule
