// tb_shaping_filter: feeds random 12-bit chips, one per 8 clocks, to the down-link and
// up-link shaping filters and compares every output sample with a convolution of the
// zero-stuffed chip stream computed here, two clocks later. Also checks that a single
// chip produces the tap table as its impulse response.
`timescale 1ns/1ps
module tb_shaping_filter;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, chip_en = 0;
  conv_t din = 0, o_dl, o_ul;
  int checks = 0, failures = 0;
  longint hist [$];
  longint e_dl [$], e_ul [$];

  always #5 clk = ~clk;
  shaping_filter #(.SET(FIR_TX_DL)) dut_dl (.clk, .rst, .chip_en, .din, .dout(o_dl));
  shaping_filter #(.SET(FIR_TX_UL)) dut_ul (.clk, .rst, .chip_en, .din, .dout(o_ul));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic longint conv(fir_set_e s);
    longint a = 0;
    for (int k = 0; k < fir_ntaps(s); k++) a += hist[k] * fir_coef(s, k);
    return sat(a >>> fir_shift(s), DW);
  endfunction

  initial begin
    for (int k = 0; k < 64; k++) hist.push_front(0);
    e_dl = '{0, 0}; e_ul = '{0, 0};
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      chk(o_dl == e_dl.pop_front() && o_ul == e_ul.pop_front(), $sformatf("t=%0d", t));
      chip_en = (t % 8 == 0);
      // Impulse for the first 100 clocks, random chips after that.
      if (t < 100) din = (t == 0) ? 12'sd1024 : 12'sd0;
      else din = 12'($signed($urandom_range(0, 3000)) - 1500);
      hist.push_front(chip_en ? longint'(din) : 0);
      e_dl.push_back(conv(FIR_TX_DL));
      e_ul.push_back(conv(FIR_TX_UL));
      if (t < 49 && t % 8 == 0)
        chk(conv(FIR_TX_DL) == sat((1024 * fir_coef(FIR_TX_DL, t)) >>> fir_shift(FIR_TX_DL), DW),
            "impulse response");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
