// tb_dl_ms_rx: down-link receiver fed by the down-link transmitter (2 users, 1280-chip
// frame) through a 45-sample delay (so the best chip sampling phase is not 0) with
// additive noise.
//
// The pilot is switched off for the first 3 frames: no detection and no lock may happen
// then. Once it is on, the receiver must detect the frame once, stay locked, and every
// symbol it decides for user 0 must equal the 8 bits the transmitter took from user 0 in
// that symbol (symbols are located by counting frame starts at both ends). The serial
// output must repeat the same bit stream. Channel estimates, a non-zero chip phase and
// AFC activity must be seen.
`timescale 1ns/1ps
module tb_dl_ms_rx;
  import cdma_pkg::*;
  localparam int NU = 2, FR = 1280, SPF = FR / SYM_CHIPS, DELAY = 45;
  localparam int CYCLES = 14 * FR * 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NU-1:0] uv = '1, ub = 0, ur;
  logic [NU-1:0][3:0] ch_en = '{4'hF, 4'hF};
  logic [NU-1:0][3:0][4:0] code;
  logic signed [NU-1:0][1:0][7:0] ci = '0, cq = '0;
  logic [NU-1:0][7:0] weight = '{8'd64, 8'd64};
  logic [10:0] pg = 0;
  conv_t dac, adc;
  logic tx_fs, tx_ss;
  logic ov, ob, locked, active, fs, sv, fdet;
  logic [7:0] bits;
  sample_t hi, hq;
  logic signed [31:0] freq;
  logic [1:0] cph;

  dl_bs_tx #(.N_USERS(NU), .FRAME_CHIPS(FR)) u_tx (.clk, .rst, .user_valid(uv), .user_bit(ub),
    .user_ready(ur), .ch_en, .code, .coef_i(ci), .coef_q(cq), .weight, .pich_gain(pg),
    .bpch_gain(11'd100), .bpch_code(5'd31), .bpch_bit(1'b1), .dac, .frame_start(tx_fs),
    .sym_strobe(tx_ss));

  dl_ms_rx #(.FRAME_CHIPS(FR)) dut (.clk, .rst, .adc, .thresh(24'd12000), .afc_en(1'b1),
    .ch_en(4'hF), .code(code[0]), .out_valid(ov), .out_bit(ob), .locked, .active,
    .frame_start(fs), .sym_valid(sv), .bits, .h_i(hi), .h_q(hq), .freq, .chip_phase(cph),
    .frame_detect(fdet));

  conv_t line [DELAY];
  always_ff @(posedge clk) begin
    line[0] <= dac;
    for (int k = 1; k < DELAY; k++) line[k] <= line[k-1];
  end
  assign adc = DW'(sat(longint'(line[DELAY-1]) + longint'($signed($urandom_range(0, 60))) - 30, DW));

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  bit tx_bits [$];
  int tx_frames = 0, rx_frame = -1, rx_sym = 0, ser_ptr = -1;
  int n_detect = 0, n_sym = 0, n_ser = 0, n_est = 0, n_phase = 0, n_afc = 0;
  bit pilot_on = 0;
  always @(posedge clk) if (!rst) begin
    ub <= NU'($urandom);
    if (uv[0] && ur[0]) tx_bits.push_back(ub[0]);
    if (tx_fs) tx_frames++;
    if (fdet) begin
      n_detect++;
      chk(pilot_on, "no detection without pilot");
    end
    if (!pilot_on) chk(!locked, "no lock without pilot");
    if (fs) begin
      rx_frame = tx_frames - 1;
      rx_sym = 0;
    end
    if (sv) begin
      automatic int s = rx_frame * SPF + rx_sym;
      automatic logic [7:0] e;
      for (int k = 0; k < 8; k++) e[k] = tx_bits[8*(s-1) + k];
      n_sym++;
      chk(bits == e, $sformatf("symbol %0d: got %b sent %b", s, bits, e));
      if (ser_ptr < 0) ser_ptr = 8*(s-1);
    end
    if (dut.dm_valid) rx_sym++;
    if (ov && ser_ptr >= 0) begin
      n_ser++;
      chk(ob == tx_bits[ser_ptr], $sformatf("serial bit %0d", ser_ptr));
      ser_ptr++;
    end
    if (dut.est_valid) n_est++;
    if (cph != 0) n_phase++;
    if (freq != 0) n_afc++;
  end

  initial begin
    for (int k = 0; k < DELAY; k++) line[k] = '0;
    code[0] = {5'd4, 5'd3, 5'd2, 5'd1};
    code[1] = {5'd8, 5'd7, 5'd6, 5'd5};
    ci[0][0] = 8'sd127;
    ci[1][0] = 8'sd90;
    cq[1][0] = 8'sd90;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (3 * FR * 8) @(posedge clk);
    pilot_on = 1;
    pg = 11'd600;
    repeat (CYCLES - 3 * FR * 8) @(posedge clk);
    chk(n_detect == 1, $sformatf("%0d detections", n_detect));
    chk(locked && active, "locked at the end");
    chk(n_sym > 60 && n_ser > 400, $sformatf("%0d symbols, %0d serial bits checked", n_sym, n_ser));
    chk(n_est > 0 && n_phase > 0 && n_afc > 0, "estimates, chip phase and AFC seen");
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
