// tb_dscdma_system: end-to-end test of the modem with an ideal radio channel.
//
// The base station's DAC output is fed, delayed by DL_DELAY samples, to the mobile's ADC;
// the mobile's DAC output reaches the base station's two antenna inputs with different
// delays and gains (antenna B 8/7 stronger). Two down-link users are active, the mobile being
// user 0; up-link receivers 0 and 1 run, receiver 0 matching the mobile's code.
// Checked: every down-link symbol decided by the mobile equals the bits the base station
// sent in that symbol (located through the frame counts of both ends); the serial output
// of the mobile matches too; the up-link bits selected by the base station match the bits
// the mobile multiplexed (after aligning the two streams once, and again after an antenna
// switch); the base-station receiver of the other user never locks. Each mechanism (frame
// detection, chip-phase choice, channel estimation, AFC update, up-link acquisition,
// early-late tracking step, diversity switch) must be seen at least once.
`timescale 1ns/1ps
module tb_dscdma_system;
  import cdma_pkg::*;

  localparam int NU = 2, NR = 2, FR = 1280, SPF = FR / SYM_CHIPS;
  localparam int DL_DELAY = 36, UL_DELAY_A = 100, UL_DELAY_B = 60;
  localparam int CYCLES = 40 * FR * 8;

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

  dscdma_system #(.N_USERS(NU), .N_RX(NR), .FRAME_CHIPS(FR), .MS_USER(0)) dut (
    .clk, .rst, .user_valid, .user_bit, .user_ready, .ch_en, .code, .coef_i, .coef_q, .weight,
    .pich_gain(11'd600), .bpch_gain(11'd100), .bpch_code(5'd31), .bpch_bit(1'b1),
    .bs_dac, .bs_frame_start, .bs_adc_a, .bs_adc_b, .ul_thresh(24'd22000), .rx_valid,
    .rx_bit_i, .rx_bit_q, .rx_sel, .rx_switched, .rx_locked, .rx_power, .rx_lock_event,
    .rx_track_step, .ms_adc, .dl_thresh(24'd12000), .afc_en(1'b1), .ms_ch_en(4'hF),
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
    if (rx_lock_event[1] != 0) begin
      failures++;
      checks++;
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
    ch_en      = {4'hF, 4'hF};
    code[0]    = {5'd4, 5'd3, 5'd2, 5'd1};
    code[1]    = {5'd8, 5'd7, 5'd6, 5'd5};
    coef_i     = '0;
    coef_q     = '0;
    coef_i[0][0] = 8'sd127;
    coef_i[1][0] = 8'sd90;
    coef_q[1][0] = 8'sd90;
    weight     = {8'd64, 8'd64};
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (CYCLES) @(posedge clk);
    $display("mechanisms:");
    check_seen("frame detection", n_detect);
    check_seen("chip phase != 0", n_phase);
    check_seen("channel estimates", n_est);
    check_seen("AFC correction", n_afc);
    check_seen("DL symbols checked", n_dl_sym);
    check_seen("DL serial bits", n_dl_serial);
    check_seen("UL acquisition", n_ul_lock);
    check_seen("UL tracking steps", n_track);
    check_seen("diversity switch", n_switch);
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
