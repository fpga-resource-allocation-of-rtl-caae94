// tb_base_station: the base station (2 down-link users, 2 up-link receivers, 1280-chip
// frame) facing a mobile built from the down-link receiver and up-link transmitter of
// user 0. The down link reaches the mobile after 36 samples; the mobile's signal reaches
// antenna A after 100 samples at 7/8 gain and antenna B after 60 samples at full gain.
// Checked: every down-link symbol the mobile decides equals the 8 bits the base station
// took from user 0 in that symbol; after aligning the up-link streams (unique match of
// 12 pairs, repeated after an antenna switch) every pair selected by receiver 0 equals
// the pair the mobile sent; receiver 1 (another user's code) never locks. Up-link
// acquisition, a tracking step and an antenna switch must each be seen.
`timescale 1ns/1ps
module tb_base_station;
  import cdma_pkg::*;
  localparam int NU = 2, FR = 1280, SPF = FR / SYM_CHIPS;
  localparam int DL_DELAY = 36, UL_DELAY = 100, UL_DELAY_B = 60;
  localparam int CYCLES = 24 * FR * 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NU-1:0] uv = '1, ub = 0, ur;
  logic [NU-1:0][3:0] ch_en = '{4'hF, 4'hF};
  logic [NU-1:0][3:0][4:0] code;
  logic signed [NU-1:0][1:0][7:0] ci = '0, cq = '0;
  logic [NU-1:0][7:0] weight = '{8'd64, 8'd64};
  conv_t bs_dac, ms_adc, ms_dac, adc_a, adc_b;
  logic tx_fs, tx_ss;
  logic dl_valid, dl_bit, dl_locked, dl_active, dl_fs, dl_sv, fdet;
  logic [7:0] dl_bits;
  sample_t hi, hq;
  logic signed [31:0] afc;
  logic [1:0] cph;
  logic [3:0] sv = '1, sb = 0, sr;
  logic ul_bs, ul_i, ul_q;
  logic [1:0] rv, rbi, rbq, rsel, rsw;
  logic [1:0][1:0] rlk, rlev, rtst;
  logic [1:0][1:0][31:0] rpw;

  base_station #(.N_USERS(NU), .N_RX(2), .FRAME_CHIPS(FR)) dut (.clk, .rst, .user_valid(uv),
    .user_bit(ub), .user_ready(ur), .ch_en, .code, .coef_i(ci), .coef_q(cq), .weight,
    .pich_gain(11'd600), .bpch_gain(11'd100), .bpch_code(5'd31), .bpch_bit(1'b1), .dac(bs_dac),
    .frame_start(tx_fs), .adc_a, .adc_b, .ul_thresh(24'd22000), .rx_valid(rv), .rx_bit_i(rbi),
    .rx_bit_q(rbq), .rx_sel(rsel), .rx_switched(rsw), .rx_locked(rlk), .rx_power(rpw),
    .rx_lock_event(rlev), .rx_track_step(rtst));

  dl_ms_rx #(.FRAME_CHIPS(FR)) u_ms_rx (.clk, .rst, .adc(ms_adc), .thresh(24'd12000),
    .afc_en(1'b1), .ch_en(4'hF), .code(code[0]), .out_valid(dl_valid), .out_bit(dl_bit),
    .locked(dl_locked), .active(dl_active), .frame_start(dl_fs), .sym_valid(dl_sv),
    .bits(dl_bits), .h_i(hi), .h_q(hq), .freq(afc), .chip_phase(cph), .frame_detect(fdet));

  ul_ms_tx #(.USER(0)) u_ms_tx (.clk, .rst, .src_valid(sv), .src_bit(sb), .src_ready(sr),
    .amp(11'd600), .freq(32'h4000_0000), .dac(ms_dac), .bit_start(ul_bs), .bit_i(ul_i),
    .bit_q(ul_q));

  conv_t dl_line [DL_DELAY];
  conv_t ul_line [UL_DELAY];
  always_ff @(posedge clk) begin
    dl_line[0] <= bs_dac;
    for (int k = 1; k < DL_DELAY; k++) dl_line[k] <= dl_line[k-1];
    ul_line[0] <= ms_dac;
    for (int k = 1; k < UL_DELAY; k++) ul_line[k] <= ul_line[k-1];
  end
  assign ms_adc = dl_line[DL_DELAY-1];
  assign adc_a  = ul_line[UL_DELAY-1] - (ul_line[UL_DELAY-1] >>> 3);
  assign adc_b  = ul_line[UL_DELAY_B-1];

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  // down link
  bit tx_bits [$];
  int tx_frames = 0, rx_frame = -1, rx_sym = 0, ser_ptr = -1;
  int n_detect = 0, n_sym = 0, n_ser = 0, n_est = 0, n_afc = 0;
  always @(posedge clk) if (!rst) begin
    ub <= NU'($urandom);
    if (uv[0] && ur[0]) tx_bits.push_back(ub[0]);
    if (tx_fs) tx_frames++;
    if (fdet) n_detect++;
    if (dl_fs) begin rx_frame = tx_frames - 1; rx_sym = 0; end
    if (dl_sv) begin
      automatic int s = rx_frame * SPF + rx_sym;
      automatic logic [7:0] e;
      for (int k = 0; k < 8; k++) e[k] = tx_bits[8*(s-1) + k];
      n_sym++;
      chk(dl_bits == e, $sformatf("DL symbol %0d: got %b sent %b", s, dl_bits, e));
      if (ser_ptr < 0) ser_ptr = 8*(s-1);
    end
    if (u_ms_rx.dm_valid) rx_sym++;
    if (dl_valid && ser_ptr >= 0) begin
      n_ser++;
      chk(dl_bit == tx_bits[ser_ptr], $sformatf("DL serial bit %0d", ser_ptr));
      ser_ptr++;
    end
    if (u_ms_rx.est_valid) n_est++;
    if (afc != 0) n_afc++;
  end

  // up link
  logic [1:0] hist [$];
  logic [1:0] pend [$];
  logic bs_d;
  int ptr = -1, n_lock = 0, n_ul = 0, n_track = 0, n_switch = 0;
  always @(posedge clk) if (!rst) begin
    sb <= 4'($urandom);
    sv <= {1'b1, 1'b1, ($urandom % 3 == 0), 1'b1};
    bs_d <= ul_bs;
    if (bs_d) hist.push_back({ul_i, ul_q});
    if (rlev[0] != 0) n_lock++;
    if (rtst[0] != 0) n_track++;
    chk(rlev[1] == 0 && rlk[1] == 0, "receiver of another user never locks");
    if (rsw[0]) begin
      n_switch++;
      ptr = -1;
      pend.delete();
    end
    if (rv[0]) begin
      if (ptr < 0) begin
        pend.push_back({rbi[0], rbq[0]});
        if (pend.size() == 12) begin
          automatic int found = -1, nf = 0;
          for (int k = 0; k + 12 <= hist.size(); k++) begin
            automatic bit ok = 1;
            for (int j = 0; j < 12; j++) if (hist[k+j] != pend[j]) ok = 0;
            if (ok) begin found = k; nf++; end
          end
          chk(nf == 1, $sformatf("UL alignment (%0d candidates)", nf));
          if (nf == 1) ptr = found + 12;
          pend.delete();
        end
      end else begin
        n_ul++;
        chk(hist[ptr] == {rbi[0], rbq[0]}, $sformatf("UL bit %0d", ptr));
        ptr++;
      end
    end
  end

  initial begin
    for (int k = 0; k < DL_DELAY; k++) dl_line[k] = '0;
    for (int k = 0; k < UL_DELAY; k++) ul_line[k] = '0;
    code[0] = {5'd4, 5'd3, 5'd2, 5'd1};
    code[1] = {5'd8, 5'd7, 5'd6, 5'd5};
    ci[0][0] = 8'sd127;
    ci[1][0] = 8'sd90;
    cq[1][0] = 8'sd90;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (CYCLES) @(posedge clk);
    chk(n_detect == 1 && dl_locked, $sformatf("%0d frame detections", n_detect));
    chk(n_sym > 150 && n_ser > 1000, $sformatf("%0d DL symbols, %0d serial bits", n_sym, n_ser));
    chk(n_est > 0 && n_afc > 0, "channel estimates and AFC seen");
    chk(n_lock >= 1 && rlk[0] != 0, $sformatf("%0d UL acquisitions", n_lock));
    chk(n_track > 0 && n_switch > 0, $sformatf("%0d tracking steps, %0d antenna switches", n_track, n_switch));
    chk(n_ul > 500, $sformatf("%0d UL pairs checked", n_ul));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
