// tb_frame_sync: a 512-chip frame whose first 64 chips carry the pilot prefix at
// amplitude 200 and whose other chips are random +-200 with noise. One chip every two
// clocks. Checks: one detection per acquisition, chip_idx equal to the true chip index
// on every chip while locked, frame_start on chip 0 only, no detection while the pilot is
// switched off, loss of lock after two missed frames, and re-acquisition.
`timescale 1ns/1ps
module tb_frame_sync;
  import cdma_pkg::*;
  localparam int FR = 512, CL = 64;
  localparam logic [63:0] PRE = dl_prefix(SEED_PN1, CL);
  logic clk = 0, rst = 1, cv = 0;
  sample_t ci = 0, cq = 0;
  logic locked, fstart, detect;
  logic [8:0] cidx;
  logic [23:0] metric;
  int checks = 0, failures = 0, n_detect = 0, n_unlock = 0;

  always #5 clk = ~clk;
  frame_sync #(.CORR_LEN(CL), .FRAME_CHIPS(FR), .MAX_MISS(2)) dut (.clk, .rst, .chip_valid(cv),
    .chip_i(ci), .chip_q(cq), .thresh(24'd12000), .locked, .chip_idx(cidx), .frame_start(fstart),
    .detect, .metric);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic bit was_locked = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    // Frames 0-1 no pilot, 2-7 pilot, 8-10 no pilot, 11-14 pilot. Start mid-frame.
    for (int n = 100; n < 15 * FR; n++) begin
      automatic int f = n / FR, k = n % FR;
      automatic bit pil = (f >= 2 && f < 8) || f >= 11;
      automatic int ni = $urandom_range(0, 60), nq = $urandom_range(0, 60);
      if (k < CL && pil) begin
        // pilot on I and Q with a phase rotation (the correlator uses |cI| + |cQ|)
        ci = 16'(PRE[k] ? -140 : 140) + 16'(ni - 30);
        cq = 16'(PRE[k] ? 140 : -140) + 16'(nq - 30);
      end else begin
        ci = 16'($urandom_range(0, 1) ? -200 : 200) + 16'(ni - 30);
        cq = 16'($urandom_range(0, 1) ? -200 : 200) + 16'(nq - 30);
      end
      cv = 1;
      // Outputs that describe the chip now on the input.
      #1;
      if (locked) chk(int'(cidx) == k, $sformatf("chip_idx %0d at chip %0d frame %0d", cidx, k, f));
      chk(fstart == (locked && k == 0), "frame_start");
      if (detect) begin
        n_detect++;
        chk(k == CL && pil, $sformatf("detect at chip %0d frame %0d", k, f));
      end
      if (f == 1 || f == 10) chk(!detect, "no detection without pilot");
      @(negedge clk);
      if (was_locked && !locked) begin
        n_unlock++;
        chk(f == 9 && k == CL, $sformatf("unlock at chip %0d frame %0d", k, f));
      end
      was_locked = locked;
      cv = 0;
      @(negedge clk);
    end
    chk(n_detect == 2, $sformatf("%0d detections", n_detect));
    chk(n_unlock == 1, $sformatf("%0d unlocks", n_unlock));
    chk(locked, "locked at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
