// tb_ul_sync_acq: a stand-in correlator returns high energy only when the search offset
// equals a target. Checks that each failed dwell moves the offset down by one, that lock
// (with one lock_event) happens on the target, that inc/dec from the tracking loop move
// the offset while locked, that short fades do not unlock, that 8 weak dwells do (with
// one loss_event), and that the search then resumes and finds a new target.
`timescale 1ns/1ps
module tb_ul_sync_acq;
  logic clk = 0, rst = 1, dump = 0, inc = 0, dec = 0;
  logic [23:0] energy = 0;
  logic [7:0] offset;
  logic locked, lev, lsv;
  int checks = 0, failures = 0, n_lock = 0, n_loss = 0;
  int target = 200;
  bit fade = 0;

  always #5 clk = ~clk;
  ul_sync_acq dut (.clk, .rst, .dump, .energy, .thresh(24'd1000), .inc, .dec, .offset, .locked,
    .lock_event(lev), .loss_event(lsv));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic dwell();
    automatic logic [7:0] o = offset;
    automatic bit l = locked;
    dump = 1;
    energy = fade ? 24'd300 : (int'(offset) == target) ? 24'd5000 : 24'd200 + 24'($urandom_range(0, 500));
    #1;
    if (lev) n_lock++;
    if (lsv) n_loss++;
    @(negedge clk);
    dump = 0;
    if (!l) begin
      if (int'(o) == target) chk(locked, "lock on target");
      else chk(!locked && offset == o - 8'd1, $sformatf("search step from %0d to %0d", o, offset));
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int d = 0; d < 300 && !locked; d++) dwell();
    chk(locked && int'(offset) == target && n_lock == 1, "acquired target");
    // Tracking: one inc, two decs.
    inc = 1; @(negedge clk); inc = 0;
    chk(int'(offset) == target + 1, "inc");
    dec = 1; repeat (2) @(negedge clk); dec = 0;
    chk(int'(offset) == target - 1, "dec");
    target = target - 1;
    // A fade of 5 dwells keeps the lock.
    fade = 1;
    repeat (5) dwell();
    fade = 0;
    dwell();
    chk(locked && n_loss == 0, "short fade keeps lock");
    // A fade of 8 dwells drops it.
    fade = 1;
    repeat (8) dwell();
    fade = 0;
    chk(!locked && n_loss == 1, "long fade drops lock");
    target = 50;
    for (int d = 0; d < 300 && !locked; d++) dwell();
    chk(locked && int'(offset) == 50 && n_lock == 2, "re-acquired");
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
