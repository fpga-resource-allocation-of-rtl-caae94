// tb_chip_sync: 4 samples per chip with one strong sampling phase; the strong phase
// moves during the run. Checks that the chosen phase converges to the strong one within
// three windows after each move, that exactly one chip comes out per 4 input samples and
// that each chip carries the sample taken at the reported phase. Runs with a 16-chip
// window so that the moves settle quickly.
`timescale 1ns/1ps
module tb_chip_sync;
  import cdma_pkg::*;
  localparam int SPC = 4, WIN = 16;
  logic clk = 0, rst = 1, vin = 0;
  sample_t ii = 0, iq = 0, ci, cq;
  logic cv;
  logic [1:0] phase;
  int checks = 0, failures = 0, n_in = 0, n_chip = 0;
  sample_t exp_i [$], exp_q [$];

  always #5 clk = ~clk;
  chip_sync #(.SPC(SPC), .WIN(WIN)) dut (.clk, .rst, .in_valid(vin), .in_i(ii), .in_q(iq),
    .chip_valid(cv), .chip_i(ci), .chip_q(cq), .phase);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic int best_ph = 2;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40000; t++) begin
      automatic int tp = n_in % SPC;
      automatic int amp;
      if (cv) begin
        n_chip++;
        chk(exp_i.size() > 0 && ci == exp_i[0] && cq == exp_q[0], $sformatf("chip value t=%0d", t));
        if (exp_i.size() > 0) begin void'(exp_i.pop_front()); void'(exp_q.pop_front()); end
      end
      if (n_in == 3 * SPC * WIN * 20) best_ph = 1;
      if (n_in == 3 * SPC * WIN * 40) best_ph = 3;
      // Check the chosen phase three windows after each move and every 20 windows.
      if (vin && (n_in % (SPC * WIN * 20)) == SPC * WIN * 3)
        chk(int'(phase) == best_ph, $sformatf("phase %0d, best_ph %0d at sample %0d", phase, best_ph, n_in));
      vin = ($urandom_range(0, 1) == 1);
      amp = (tp == best_ph) ? 1500 : 300;
      ii = ($urandom_range(0, 1) ? 16'(amp) : -16'(amp)) + 16'($urandom_range(0, 100));
      iq = ($urandom_range(0, 1) ? 16'(amp) : -16'(amp)) - 16'($urandom_range(0, 100));
      if (vin) begin
        if (tp == int'(phase)) begin exp_i.push_back(ii); exp_q.push_back(iq); end
        n_in++;
      end
      @(negedge clk);
    end
    chk(n_chip == n_in / SPC || n_chip == n_in / SPC + 1 || n_chip == n_in / SPC - 1,
        $sformatf("chip count %0d for %0d samples", n_chip, n_in));
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
