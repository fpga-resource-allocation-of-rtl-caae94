// tb_mobile_terminal: the mobile terminal of user 0 between a down-link transmitter
// (2 users, 1280-chip frame, 36-sample delay to the mobile's ADC) and an up-link receiver
// for user 0 (100-sample delay from the mobile's DAC).
// Checked: every down-link symbol decided by the mobile equals the 8 bits the transmitter
// took from user 0 in that symbol (symbols located by frame counts at both ends); the
// serial output repeats them; after aligning the up-link bit streams once (unique match
// of 12 pairs), every pair decided by the up-link receiver equals the pair the mobile
// multiplexed. Frame detection, channel estimates, AFC activity and up-link acquisition
// must each be seen.
`timescale 1ns/1ps
module tb_mobile_terminal;
  import cdma_pkg::*;
  localparam int NU = 2, FR = 1280, SPF = FR / SYM_CHIPS;
  localparam int DL_DELAY = 36, UL_DELAY = 100;
  localparam int CYCLES = 24 * FR * 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NU-1:0] uv = '1, ub = 0, ur;
  logic [NU-1:0][3:0] ch_en = '{4'hF, 4'hF};
  logic [NU-1:0][3:0][4:0] code;
  logic signed [NU-1:0][1:0][7:0] ci = '0, cq = '0;
  logic [NU-1:0][7:0] weight = '{8'd64, 8'd64};
  conv_t bs_dac, ms_adc, ms_dac, bs_adc;
  logic tx_fs, tx_ss;
  logic dl_valid, dl_bit, dl_locked, dl_active, dl_fs, dl_sv, fdet;
  logic [7:0] dl_bits;
  sample_t hi, hq;
  logic signed [31:0] afc;
  logic [1:0] cph;
  logic [3:0] sv = '1, sb = 0, sr;
  logic ul_bs, ul_i, ul_q;
  logic rv, rbi, rbq, rlk, rpv, rlev, rtst;
  logic [7:0] roff;
  logic [31:0] rpw;

  dl_bs_tx #(.N_USERS(NU), .FRAME_CHIPS(FR)) u_tx (.clk, .rst, .user_valid(uv), .user_bit(ub),
    .user_ready(ur), .ch_en, .code, .coef_i(ci), .coef_q(cq), .weight, .pich_gain(11'd600),
    .bpch_gain(11'd100), .bpch_code(5'd31), .bpch_bit(1'b1), .dac(bs_dac), .frame_start(tx_fs),
    .sym_strobe(tx_ss));

  mobile_terminal #(.USER(0), .FRAME_CHIPS(FR)) dut (.clk, .rst, .adc(ms_adc),
    .dl_thresh(24'd12000), .afc_en(1'b1), .ch_en(4'hF), .code(code[0]), .dl_valid, .dl_bit,
    .dl_locked, .dl_active, .dl_frame_start(dl_fs), .dl_sym_valid(dl_sv), .dl_bits, .h_i(hi),
    .h_q(hq), .afc_freq(afc), .chip_phase(cph), .frame_detect(fdet), .src_valid(sv),
    .src_bit(sb), .src_ready(sr), .ul_amp(11'd600), .ul_freq(32'h4000_0000), .dac(ms_dac),
    .ul_bit_start(ul_bs), .ul_bit_i(ul_i), .ul_bit_q(ul_q));

  ul_bs_rx #(.USER(0)) u_rx (.clk, .rst, .adc(bs_adc), .thresh(24'd22000), .bit_valid(rv),
    .bit_i(rbi), .bit_q(rbq), .locked(rlk), .offset(roff), .power(rpw), .power_valid(rpv),
    .lock_event(rlev), .track_step(rtst));

  conv_t dl_line [DL_DELAY];
  conv_t ul_line [UL_DELAY];
  always_ff @(posedge clk) begin
    dl_line[0] <= bs_dac;
    for (int k = 1; k < DL_DELAY; k++) dl_line[k] <= dl_line[k-1];
    ul_line[0] <= ms_dac;
    for (int k = 1; k < UL_DELAY; k++) ul_line[k] <= ul_line[k-1];
  end
  assign ms_adc = dl_line[DL_DELAY-1];
  assign bs_adc = ul_line[UL_DELAY-1];

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
    if (dut.u_dl_rx.dm_valid) rx_sym++;
    if (dl_valid && ser_ptr >= 0) begin
      n_ser++;
      chk(dl_bit == tx_bits[ser_ptr], $sformatf("DL serial bit %0d", ser_ptr));
      ser_ptr++;
    end
    if (dut.u_dl_rx.est_valid) n_est++;
    if (afc != 0) n_afc++;
  end

  // up link
  logic [1:0] hist [$];
  logic [1:0] pend [$];
  logic bs_d;
  int ptr = -1, n_lock = 0, n_ul = 0;
  always @(posedge clk) if (!rst) begin
    sb <= 4'($urandom);
    sv <= {1'b1, 1'b1, ($urandom % 3 == 0), 1'b1};
    bs_d <= ul_bs;
    if (bs_d) hist.push_back({ul_i, ul_q});
    if (rlev) n_lock++;
    if (rv) begin
      if (ptr < 0) begin
        pend.push_back({rbi, rbq});
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
        chk(hist[ptr] == {rbi, rbq}, $sformatf("UL bit %0d", ptr));
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
    chk(n_lock == 1 && rlk, $sformatf("%0d UL acquisitions", n_lock));
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
