// tb_channel_estimator: chips built as h * pilot + noise with a slowly changing complex h
// and random gaps in chip_valid and active. The expected estimate, the pilot-despread
// sum over a 128-chip symbol (including the sym_last chip) shifted right by 7, is
// computed here; the estimate must also lie within noise of the true h.
`timescale 1ns/1ps
module tb_channel_estimator;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, cv = 0, act = 0, last = 0, pilot = 0;
  sample_t ci = 0, cq = 0, hi, hq;
  logic ev;
  int checks = 0, failures = 0, n_est = 0;

  always #5 clk = ~clk;
  channel_estimator dut (.clk, .rst, .chip_valid(cv), .active(act), .sym_last(last),
    .chip_i(ci), .chip_q(cq), .pilot, .est_valid(ev), .h_i(hi), .h_q(hq));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    automatic longint ai = 0, aq = 0;
    automatic int th_i = 800, th_q = -300, k = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60000; t++) begin
      automatic bit take;
      cv = ($urandom_range(0, 2) == 0);
      act = (t > 300);
      pilot = $urandom;
      last = (k == SYM_CHIPS - 1);
      ci = 16'((pilot ? -th_i : th_i) + $signed($urandom_range(0, 400)) - 200);
      cq = 16'((pilot ? -th_q : th_q) + $signed($urandom_range(0, 400)) - 200);
      take = cv && act;
      if (take) begin
        ai += pilot ? -longint'(ci) : longint'(ci);
        aq += pilot ? -longint'(cq) : longint'(cq);
      end
      @(negedge clk);
      if (take && last) begin
        n_est++;
        chk(ev && hi == sat(ai >>> 7, SW) && hq == sat(aq >>> 7, SW),
            $sformatf("estimate %0d: got %0d,%0d exp %0d,%0d", n_est, hi, hq, ai >>> 7, ai >>> 7));
        // The first dump after active rises may cover only part of a symbol.
        if (n_est > 1) chk(iabs(hi - th_i) < 60 && iabs(hq - th_q) < 60, "estimate near h");
        ai = 0; aq = 0;
        th_i = th_i - 7; th_q = th_q + 11;
      end else begin
        chk(!ev, "no spurious est_valid");
      end
      if (take) k = (k + 1) % SYM_CHIPS;
    end
    chk(n_est > 100, "enough estimates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
