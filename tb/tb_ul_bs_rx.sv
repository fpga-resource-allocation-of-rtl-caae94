// tb_ul_bs_rx: up-link receivers fed by the user-0 up-link transmitter through a delay
// line of 100 samples that later becomes 104 samples (a half-chip timing jump of a whole
// number of carrier cycles, which the early-late loop has to follow). Receiver 0 uses
// user 0's code, receiver 1 user 1's code.
// Checks: receiver 0 acquires once and stays locked; after aligning the two bit streams
// once (unique match of 12 bit pairs, repeated after the jump) every decided I/Q pair
// equals the transmitted one; tracking steps happen after the jump; power reports arrive
// and are non-zero; receiver 1 never locks.
`timescale 1ns/1ps
module tb_ul_bs_rx;
  import cdma_pkg::*;
  localparam int CYCLES = 400 * 256, JUMP = 200 * 256;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] sv = '1, sb = 0, sr;
  conv_t dac, adc;
  logic bs, tbi, tbq;
  logic [1:0] bv, bi, bq, lk, pv, lev, tst;
  logic [1:0][7:0] off;
  logic [1:0][31:0] pw;
  int dly = 100;

  ul_ms_tx #(.USER(0)) u_tx (.clk, .rst, .src_valid(sv), .src_bit(sb), .src_ready(sr),
    .amp(11'd600), .freq(32'h4000_0000), .dac, .bit_start(bs), .bit_i(tbi), .bit_q(tbq));
  for (genvar r = 0; r < 2; r++) begin : g_rx
    ul_bs_rx #(.USER(r)) dut (.clk, .rst, .adc, .thresh(24'd22000), .bit_valid(bv[r]),
      .bit_i(bi[r]), .bit_q(bq[r]), .locked(lk[r]), .offset(off[r]), .power(pw[r]),
      .power_valid(pv[r]), .lock_event(lev[r]), .track_step(tst[r]));
  end

  conv_t line [128];
  always_ff @(posedge clk) begin
    line[0] <= dac;
    for (int k = 1; k < 128; k++) line[k] <= line[k-1];
  end
  assign adc = line[dly-1];

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  logic [1:0] hist [$];
  logic [1:0] pend [$];
  logic bs_d;
  int ptr = -1, n_lock = 0, n_track_after = 0, n_bits = 0, n_pow = 0, tclk = 0;
  always @(posedge clk) if (!rst) begin
    tclk++;
    sb <= 4'($urandom);
    bs_d <= bs;
    if (bs_d) hist.push_back({tbi, tbq});
    if (lev[0]) n_lock++;
    if (tst[0] && tclk > JUMP) n_track_after++;
    if (pv[0] && lk[0]) begin n_pow++; chk(pw[0] > 0, "power reported"); end
    chk(!lk[1], "receiver of another user never locks");
    if (tclk == JUMP) begin ptr = -1; pend.delete(); end
    if (bv[0]) begin
      if (ptr < 0) begin
        pend.push_back({bi[0], bq[0]});
        if (pend.size() == 12) begin
          automatic int found = -1, nf = 0;
          for (int k = 0; k + 12 <= hist.size(); k++) begin
            automatic bit ok = 1;
            for (int j = 0; j < 12; j++) if (hist[k+j] != pend[j]) ok = 0;
            if (ok) begin found = k; nf++; end
          end
          chk(nf == 1, $sformatf("alignment (%0d candidates) at clock %0d", nf, tclk));
          if (nf == 1) ptr = found + 12;
          pend.delete();
        end
      end else begin
        n_bits++;
        chk(hist[ptr] == {bi[0], bq[0]}, $sformatf("bit %0d", ptr));
        ptr++;
      end
    end
  end

  initial begin
    for (int k = 0; k < 128; k++) line[k] = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (JUMP) @(posedge clk);
    dly = 104;
    repeat (CYCLES - JUMP) @(posedge clk);
    chk(n_lock == 1 && lk[0], $sformatf("%0d acquisitions", n_lock));
    chk(n_track_after > 0, "tracking follows the jump");
    chk(n_bits > 250 && n_pow > 10, $sformatf("%0d bits, %0d power reports", n_bits, n_pow));
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
