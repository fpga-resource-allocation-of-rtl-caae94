// tb_nco: steps the oscillator at several frequency words (fs/4, a slow rate, a negative
// rate) with random enable gaps, keeps its own 32-bit phase, and checks that each output
// pair is within 2 LSB of 2047*cos and 2047*sin of the phase's top 8 bits. A second
// instance with a start phase of one half turn must begin at -1 on the cosine.
`timescale 1ns/1ps
module tb_nco;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] freq = 0;
  logic signed [11:0] co, so, co2, so2;
  int checks = 0, failures = 0;
  logic [31:0] ph = 0;

  always #5 clk = ~clk;
  nco dut (.clk, .rst, .en, .freq, .cos_o(co), .sin_o(so));
  nco #(.PHASE0(32'h8000_0000)) dut2 (.clk, .rst, .en, .freq, .cos_o(co2), .sin_o(so2));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic bit near(int got, real want);
    return ((real'(got) - want) <= 2.0) && ((want - real'(got)) <= 2.0);
  endfunction

  initial begin
    real w;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    chk(co == 2047 && so == 0, "reset value");
    freq = 32'h4000_0000;
    en = 1;
    @(negedge clk);
    chk(co2 == -2047 && so2 == 0, "half-turn start phase");
    ph = ph + freq;
    for (int t = 0; t < 6000; t++) begin
      if (t == 2000) freq = 32'h0123_4567;
      if (t == 4000) freq = -32'h0345_6789;
      en = (t < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        w = 2.0 * 3.14159265358979 * real'(ph[31:24]) / 256.0;
        chk(near(co, 2047.0 * $cos(w)) && near(so, 2047.0 * $sin(w)),
            $sformatf("t=%0d ph=%h got %0d,%0d", t, ph, co, so));
        ph = ph + freq;
      end
      if (t < 100) chk(co2 == -co && so2 == -so, "half-turn instance");
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
