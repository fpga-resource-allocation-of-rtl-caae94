// tb_fed: a sequence of channel estimates that rotate by a fixed angle per symbol, with
// random amplitude noise. The expected error (cross product of the previous and current
// estimate) and the accumulated frequency word are computed here. Checks the sign of the
// error for both rotation directions and that the first estimate only primes the detector.
`timescale 1ns/1ps
module tb_fed;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, ev = 0;
  sample_t hi = 0, hq = 0;
  logic signed [31:0] freq, err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fed dut (.clk, .rst, .est_valid(ev), .h_i(hi), .h_q(hq), .freq, .err);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic longint pi = 0, pq = 0, f = 0, e;
    automatic real ang = 0.3, step = 0.02;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic real a = (n % 7 == 0) ? 30000.0 : 1000.0 + real'($urandom_range(0, 200));
      hi = 16'($rtoi(a * $cos(ang)));
      hq = 16'($rtoi(a * $sin(ang)));
      ang += step;
      if (n == 999) step = -0.035;
      ev = 1;
      @(negedge clk);
      ev = 0;
      if (n == 0) begin
        chk(freq == 0 && err == 0, "first estimate only primes");
      end else begin
        e = pi * hq - pq * hi;
        f = longint'(32'(f + (e >>> 8)));
        chk(err == e && freq == f, $sformatf("n=%0d err %0d exp %0d", n, err, e));
        chk((n <= 1000) ? err > 0 : err < 0, $sformatf("error sign follows rotation n=%0d err=%0d", n, err));
      end
      pi = hi; pq = hq;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        chk(err == e || n == 0, "hold between estimates");
      end
    end
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
