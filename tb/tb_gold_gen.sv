// tb_gold_gen: compares the generator with the two linear recurrences written out here
// (a[n+18] = a[n+7] ^ a[n], b[n+18] = b[n+10] ^ b[n+7] ^ b[n+5] ^ b[n]) over two periods
// of a shortened frame and over the first 5000 chips of the default 10 ms frame. Checks
// the restart at the frame end (`last`) and the restart input.
`timescale 1ns/1ps
module tb_gold_gen;
  import cdma_pkg::*;
  localparam int P = 300;
  logic clk = 0, rst = 1, en = 0, restart = 0;
  logic chip_s, last_s, chip_f, last_f;
  int checks = 0, failures = 0;
  bit a [0:6000];
  bit b [0:6000];
  bit ref_chip [0:6000];

  always #5 clk = ~clk;
  gold_gen #(.PERIOD(P), .SEED_A(SEED_PN2)) dut_s (
    .clk, .rst, .en, .restart, .chip(chip_s), .last(last_s));
  gold_gen dut_f (.clk, .rst, .en, .restart(1'b0), .chip(chip_f), .last(last_f));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic void build(logic [17:0] sa);
    for (int i = 0; i < 18; i++) begin a[i] = sa[i]; b[i] = DL_SEED_B[i]; end
    for (int n = 0; n + 18 <= 6000; n++) begin
      a[n+18] = a[n+7] ^ a[n];
      b[n+18] = b[n+10] ^ b[n+7] ^ b[n+5] ^ b[n];
    end
    for (int n = 0; n <= 6000; n++) ref_chip[n] = a[n] ^ b[n];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      build(SEED_PN1);
      chk(chip_f == ref_chip[n], $sformatf("default chip %0d", n));
      build(SEED_PN2);
      chk(chip_s == ref_chip[n % P], $sformatf("short chip %0d", n));
      chk(last_s == ((n % P) == P - 1), "last");
      if (n < 100) chk(!last_f, "no frame end yet");
      en = 1; @(negedge clk); en = 0;
    end
    restart = 1; @(negedge clk); restart = 0;
    chk(chip_s == ref_chip[0], "restart");
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
