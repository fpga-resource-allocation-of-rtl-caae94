// tb_fir_filter: drives the half-band table with decimation by 2 and the down-link matched
// filter without decimation, both with random in_valid gaps and random samples (moderate
// ones first, full-scale ones after). The expected outputs are direct convolutions over
// the accepted samples, scaled and saturated here, compared in order as out_valid pulses
// arrive.
`timescale 1ns/1ps
module tb_fir_filter;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, vin = 0;
  logic signed [15:0] din = 0;
  logic hb_v, mf_v;
  logic signed [15:0] hb_o, mf_o;
  int checks = 0, failures = 0;
  longint hist [$];
  longint exp_hb [$], exp_mf [$];
  int n_in = 0;

  always #5 clk = ~clk;
  fir_filter #(.SET(FIR_HB), .IW(16), .OW(16), .DECIM(2)) dut_hb (.clk, .rst, .in_valid(vin),
    .din, .out_valid(hb_v), .dout(hb_o));
  fir_filter #(.SET(FIR_MF_DL), .IW(16), .OW(16), .DECIM(1)) dut_mf (.clk, .rst, .in_valid(vin),
    .din, .out_valid(mf_v), .dout(mf_o));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic longint conv(fir_set_e s);
    longint a = 0;
    for (int k = 0; k < fir_ntaps(s); k++) a += hist[k] * fir_coef(s, k);
    a = a >>> fir_shift(s);
    return sat(a, 16);
  endfunction

  initial begin
    for (int k = 0; k < 64; k++) hist.push_front(0);
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (hb_v) begin
        chk(exp_hb.size() > 0 && hb_o == exp_hb[0], $sformatf("hb t=%0d got %0d", t, hb_o));
        if (exp_hb.size() > 0) void'(exp_hb.pop_front());
      end
      if (mf_v) begin
        chk(exp_mf.size() > 0 && mf_o == exp_mf[0], $sformatf("mf t=%0d got %0d", t, mf_o));
        if (exp_mf.size() > 0) void'(exp_mf.pop_front());
      end
      vin = ($urandom_range(0, 3) != 0);
      din = (t < 3000) ? 16'($signed($urandom_range(0, 8000)) - 4000) : 16'($urandom);
      if (vin) begin
        hist.push_front(din);
        n_in++;
        exp_mf.push_back(conv(FIR_MF_DL));
        if (n_in % 2 == 0) exp_hb.push_back(conv(FIR_HB));
      end
    end
    repeat (4) begin
      @(negedge clk);
      vin = 0;
      if (hb_v) begin chk(hb_o == exp_hb[0], "hb tail"); void'(exp_hb.pop_front()); end
      if (mf_v) begin chk(mf_o == exp_mf[0], "mf tail"); void'(exp_mf.pop_front()); end
    end
    chk(exp_hb.size() == 0 && exp_mf.size() == 0, $sformatf("all outputs delivered (%0d, %0d left)", exp_hb.size(), exp_mf.size()));
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
