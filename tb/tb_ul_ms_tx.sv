// tb_ul_ms_tx: up-link transmitter of user 5 with the four sources always offering random
// bits. Checks: bit periods start every 256 clocks; the I/Q bit pair of each period is
// made of bits the sources handed over in that period; every chip entering the shaping
// filters is +-amp with the sign of (bit XOR code chip), the code chips being the user's
// 32-chip code in order; the DAC output is silent with amp = 0 and its peak scales with
// amp (twice the amplitude gives twice the peak within 2%).
`timescale 1ns/1ps
module tb_ul_ms_tx;
  import cdma_pkg::*;
  localparam int USER = 5;
  localparam logic [31:0] CODE = ul_code(USER);
  logic clk = 0, rst = 1;
  logic [3:0] sv = '1, sb = 0, sr;
  logic [10:0] amp = 0;
  conv_t dac;
  logic bs, bi, bq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ul_ms_tx #(.USER(USER)) dut (.clk, .rst, .src_valid(sv), .src_bit(sb), .src_ready(sr), .amp,
    .freq(32'h4000_0000), .dac, .bit_start(bs), .bit_i(bi), .bit_q(bq));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  int last_bs = -1, tclk = 0, chip_k = -1, n_chips = 0, peak = 0;
  bit taken [$];
  logic [3:0] sb_s;
  always @(posedge clk) if (!rst) begin
    tclk++;
    sb <= 4'($urandom);
    if (dut.chip_en && chip_k >= 0) begin
      chk(dut.ci == ((bi ^ CODE[chip_k]) ? -DW'(amp) : DW'(amp)) &&
          dut.cq == ((bq ^ CODE[chip_k]) ? -DW'(amp) : DW'(amp)), $sformatf("chip %0d", chip_k));
      n_chips++;
    end
    if (dut.chip_en && chip_k >= 0) chip_k = (chip_k + 1) % 32;
    if (bs) begin
      if (last_bs >= 0) chk(tclk - last_bs == 256, "bit period");
      last_bs = tclk;
      chip_k = 0;
      sb_s = sb;
    end
    // src_ready of the sources taken on a bit start shows one clock later.
    if (last_bs == tclk - 1 && last_bs > 0) begin
      automatic bit ok = 0;
      taken.delete();
      for (int s = 0; s < 4; s++) if (sr[s]) taken.push_back(sb_s[s]);
      foreach (taken[j]) foreach (taken[k]) if (j != k && bi == taken[j] && bq == taken[k]) ok = 1;
      chk(ok && taken.size() == 2, "bit pair comes from the sources");
    end
    if ((dac < 0 ? -int'(dac) : int'(dac)) > peak) peak = dac < 0 ? -int'(dac) : int'(dac);
  end

  initial begin
    automatic int p1, p2;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20 * 256) @(negedge clk);
    chk(peak == 0, "silent with amp 0");
    amp = 300; peak = 0;
    repeat (40 * 256) @(negedge clk);
    p1 = peak; amp = 600; peak = 0;
    repeat (40 * 256) @(negedge clk);
    p2 = peak;
    chk(p2 > 2 * p1 - 2 * p1 / 50 && p2 < 2 * p1 + 2 * p1 / 50, $sformatf("peaks %0d, %0d", p1, p2));
    chk(n_chips > 2000, "enough chips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120 * 256) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
