// tb_dscdma_full: end-to-end test of the modem at its full size: 16 down-link users,
// 16 up-link receivers with two antennas each, 10 ms frames of 40960 chips. The system
// is instantiated with all its parameters at their default values.
//
// Channel: the base station's DAC reaches the mobile's ADC after 36 samples; the mobile's
// DAC reaches antenna A after 100 samples at 7/8 gain and antenna B after 60 samples.
// Load: the 30 traffic Walsh codes (0 carries the pilot, 31 the broadcast channel) are
// shared by all 16 users: user 0 (the mobile under test) has 4 channels on codes 1-4,
// users 1-11 have 2 channels each on codes 5-26 and users 12-15 one channel each on codes
// 27-30. Every user's bit source is always full. With this load the frame-detection
// threshold is set to 16000 (12000 in the two-user test): at 12000 the partly filled
// correlator can fire on the very first pilot prefix after reset.
// Checked over 2.2 frames: every down-link symbol the mobile decides equals the bits
// the base station took from user 0 in that symbol, and so does its serial output; the
// up-link pairs selected by receiver 0 equal the pairs the mobile sent (after aligning the
// streams once, and again after an antenna switch); receivers 1-15 (other users' codes)
// never lock. Frame detection, channel estimation, up-link acquisition and decided bits
// in both directions must each be seen.
`timescale 1ns/1ps
module tb_dscdma_full;
  import cdma_pkg::*;

  localparam int NU = N_USERS, NR = 16, FR = FRAME_CHIPS, SPF = FR / SYM_CHIPS;
  localparam int DL_DELAY = 36, UL_DELAY_A = 100, UL_DELAY_B = 60;
  localparam int CYCLES = 22 * FR * 8 / 10;

  logic clk = 0, rst = 1;
  always #15 clk = ~clk;

  logic [NU-1:0] user_valid, user_bit, user_ready;
  logic [NU-1:0][3:0] ch_en;
  logic [NU-1:0][3:0][4:0] code;
  logic signed [NU-1:0][1:0][7:0] coef_i, coef_q;
  logic [NU-1:0][7:0] weight;
  conv_t bs_dac, ms_dac, ms_adc, bs_adc_a, bs_adc_b;
  logic bs_frame_start;
  logic [NR-1:0] rx_valid, rx_bit_i, rx_bit_q, rx_sel, rx_switched;
  logic [NR-1:0][1:0] rx_locked, rx_lock_event, rx_track_step;
  logic [NR-1:0][1:0][31:0] rx_power;
  logic dl_valid, dl_bit, dl_locked, dl_active, dl_frame_start, dl_sym_valid, frame_detect;
  logic [7:0] dl_bits;
  sample_t dl_h_i, dl_h_q;
  logic signed [31:0] afc_freq;
  logic [1:0] chip_phase;
  logic [3:0] src_valid, src_bit, src_ready;
  logic ul_bit_start, ul_bit_i, ul_bit_q;

  dscdma_system dut (
    .clk, .rst, .user_valid, .user_bit, .user_ready, .ch_en, .code, .coef_i, .coef_q, .weight,
    .pich_gain(11'd600), .bpch_gain(11'd100), .bpch_code(5'd31), .bpch_bit(1'b1),
    .bs_dac, .bs_frame_start, .bs_adc_a, .bs_adc_b, .ul_thresh(24'd22000), .rx_valid,
    .rx_bit_i, .rx_bit_q, .rx_sel, .rx_switched, .rx_locked, .rx_power, .rx_lock_event,
    .rx_track_step, .ms_adc, .dl_thresh(24'd16000), .afc_en(1'b1), .ms_ch_en(4'hF),
    .ms_code(code[0]), .dl_valid, .dl_bit, .dl_locked, .dl_active, .dl_frame_start,
    .dl_sym_valid, .dl_bits, .dl_h_i, .dl_h_q, .afc_freq, .chip_phase, .frame_detect,
    .src_valid, .src_bit, .src_ready, .ul_amp(11'd600), .ul_freq(32'h4000_0000), .ms_dac,
    .ul_bit_start, .ul_bit_i, .ul_bit_q);

  // ideal channel: delay lines
  conv_t dl_line [DL_DELAY];
  conv_t ul_line [UL_DELAY_A];
  always_ff @(posedge clk) begin
    dl_line[0] <= bs_dac;
    for (int k = 1; k < DL_DELAY; k++) dl_line[k] <= dl_line[k-1];
    ul_line[0] <= ms_dac;
    for (int k = 1; k < UL_DELAY_A; k++) ul_line[k] <= ul_line[k-1];
  end
  assign ms_adc   = dl_line[DL_DELAY-1];
  assign bs_adc_a = ul_line[UL_DELAY_A-1] - (ul_line[UL_DELAY_A-1] >>> 3);
  assign bs_adc_b = ul_line[UL_DELAY_B-1];

  initial begin
    for (int k = 0; k < DL_DELAY; k++) dl_line[k] = '0;
    for (int k = 0; k < UL_DELAY_A; k++) ul_line[k] = '0;
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_detect = 0, n_phase = 0, n_est = 0, n_afc = 0, n_ul_lock = 0, n_track = 0,
      n_switch = 0, n_dl_sym = 0, n_dl_serial = 0, n_ul_bits = 0;

  // ---- down-link bookkeeping
  bit tx_bits [$];
  int tx_frames = 0, rx_frame = -1, rx_sym = 0;
  int ser_ptr = -1;
  always @(posedge clk) if (!rst) begin
    if (user_valid[0] && user_ready[0]) tx_bits.push_back(user_bit[0]);
    if (bs_frame_start) tx_frames++;
    if (dl_frame_start) begin
      rx_frame = tx_frames - 1;
      rx_sym = 0;
    end
    if (dl_sym_valid) begin
      automatic int s = rx_frame * SPF + rx_sym;
      automatic logic [7:0] exp_b;
      for (int k = 0; k < 8; k++) exp_b[k] = tx_bits[8*(s-1) + k];
      checks++;
      n_dl_sym++;
      if (dl_bits !== exp_b) begin
        failures++;
        if (failures < 10) $display("DL symbol %0d: got %b expected %b", s, dl_bits, exp_b);
      end
      if (ser_ptr < 0) ser_ptr = 8*(s-1);
    end
    if (dut.u_ms.u_dl_rx.dm_valid) rx_sym++;
    if (dl_valid && ser_ptr >= 0) begin
      checks++;
      n_dl_serial++;
      if (dl_bit !== tx_bits[ser_ptr]) failures++;
      ser_ptr++;
    end
    if (frame_detect) begin
      n_detect++;
    end
    if (chip_phase != 0) n_phase++;
    if (dut.u_ms.u_dl_rx.est_valid) n_est++;
    if (afc_freq != 0) n_afc++;
  end

  // ---- up-link bookkeeping
  logic [1:0] ul_hist [$];
  logic       ul_load_d;
  int ul_ptr = -1;
  logic [1:0] rx_pend [$];
  always @(posedge clk) if (!rst) begin
    ul_load_d <= ul_bit_start;
    if (ul_load_d) ul_hist.push_back({ul_bit_i, ul_bit_q});
    if (rx_lock_event[0] != 0) n_ul_lock++;
    if (rx_track_step[0] != 0) n_track++;
    if (rx_switched[0]) begin
      n_switch++;
      ul_ptr = -1;
      rx_pend.delete();
    end
    for (int r = 1; r < NR; r++) if (rx_lock_event[r] != 0) begin
      failures++;
      checks++;
      $display("receiver %0d locked", r);
    end
    if (rx_valid[0]) begin
      if (ul_ptr < 0) begin
        // (re)align: find the unique place of the last 12 received pairs in the sent ones
        rx_pend.push_back({rx_bit_i[0], rx_bit_q[0]});
        if (rx_pend.size() == 12) begin
          automatic int found = -1, nfound = 0;
          for (int k = 0; k + 12 <= ul_hist.size(); k++) begin
            automatic bit ok = 1;
            for (int j = 0; j < 12; j++) if (ul_hist[k+j] != rx_pend[j]) ok = 0;
            if (ok) begin found = k; nfound++; end
          end
          checks++;
          if (nfound != 1) begin
            failures++;
            $display("UL alignment failed (%0d candidates)", nfound);
          end else ul_ptr = found + 12;
          rx_pend.delete();
        end
      end else begin
        checks++;
        n_ul_bits++;
        if (ul_hist[ul_ptr] !== {rx_bit_i[0], rx_bit_q[0]}) begin
          failures++;
          if (failures < 10) $display("UL bit %0d: got %b expected %b", ul_ptr, {rx_bit_i[0], rx_bit_q[0]}, ul_hist[ul_ptr]);
        end
        ul_ptr++;
      end
    end
  end

  // stimulus
  always @(posedge clk) begin
    user_bit   <= NU'($urandom);
    src_bit    <= 4'($urandom);
    src_valid  <= {1'b1, 1'b1, ($urandom % 3 == 0), 1'b1};
  end

  task automatic check_seen(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", name);
    end else $display("  %-22s %0d", name, n);
  endtask

  initial begin
    user_valid = '1;
    user_bit   = '0;
    src_valid  = '1;
    src_bit    = '0;
    coef_i     = '0;
    coef_q     = '0;
    code       = '0;
    ch_en[0]   = 4'hF;
    code[0]    = {5'd4, 5'd3, 5'd2, 5'd1};
    for (int u = 1; u < NU; u++) begin
      if (u < 12) begin
        ch_en[u]   = 4'h3;
        code[u][0] = 5'(3 + 2 * u);
        code[u][1] = 5'(4 + 2 * u);
      end else begin
        ch_en[u]   = 4'h1;
        code[u][0] = 5'(15 + u);
      end
    end
    for (int u = 0; u < NU; u++) begin
      // alternate real and 45-degree complex pre-rake taps
      coef_i[u][0] = (u % 2 == 0) ? 8'sd64 : 8'sd45;
      coef_q[u][0] = (u % 2 == 0) ? 8'sd0 : 8'sd45;
      weight[u]    = 8'd64;
    end
    coef_i[0][0] = 8'sd127;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (CYCLES) @(posedge clk);
    $display("mechanisms:");
    check_seen("frame detection", n_detect);
    check_seen("channel estimates", n_est);
    check_seen("DL symbols checked", n_dl_sym);
    check_seen("DL serial bits", n_dl_serial);
    check_seen("UL acquisition", n_ul_lock);
    $display("  UL tracking steps      %0d", n_track);
    $display("  diversity switches     %0d", n_switch);
    check_seen("UL bits checked", n_ul_bits);
    $display("h = (%0d, %0d), afc freq = %0d, rx power A=%0d B=%0d, sel=%0d", dl_h_i, dl_h_q,
             afc_freq, rx_power[0][0], rx_power[0][1], rx_sel[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (CYCLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
