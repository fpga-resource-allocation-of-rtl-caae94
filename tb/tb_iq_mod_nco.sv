// tb_iq_mod_nco: random I and Q at several carrier frequency words. The expected output
// I*cos - Q*sin (>> 11, 12-bit saturation) is formed here from the carrier phase
// t*freq + half turn, within 3 LSB for the 8-bit phase table. At fs/4 the output must
// also follow the exact cycle -Q, -I, Q, I (within 1 LSB), phase-locked to reset.
`timescale 1ns/1ps
module tb_iq_mod_nco;
  import cdma_pkg::*;
  logic clk = 0, rst = 1;
  conv_t ii = 0, iq = 0, dout;
  logic [31:0] freq = 32'h4000_0000;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  iq_mod_nco dut (.clk, .rst, .in_i(ii), .in_q(iq), .freq, .dout);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic logic [31:0] ph = 32'h8000_0000;
    automatic logic [31:0] pf = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 6000; t++) begin
      automatic real w, e;
      if (t == 2000) freq = 32'h0abc_d123;
      if (t == 4000) freq = 32'h3e00_0000;
      ii = 12'($signed($urandom_range(0, 3000)) - 1500);
      iq = 12'($signed($urandom_range(0, 3000)) - 1500);
      // The carrier sample used now is the phase reached one clock before.
      w = 2.0 * 3.14159265358979 * real'(ph[31:24]) / 256.0;
      e = (real'(ii) * 2047.0 * $cos(w) - real'(iq) * 2047.0 * $sin(w)) / 2048.0;
      if (t >= 1) ph = ph + pf;
      pf = freq;
      @(negedge clk);
      if (t > 1) begin
        chk((real'(dout) - e) <= 3.0 && (e - real'(dout)) <= 3.0, $sformatf("t=%0d got %0d exp %f", t, dout, e));
      end
      if (t > 1 && t < 2000) begin
        case (t % 4)
          0: chk(dout == -iq || dout == -iq - 1 || dout == -iq + 1, "fs/4 phase 0");
          1: chk(dout == -ii || dout == -ii - 1 || dout == -ii + 1, "fs/4 phase 1");
          2: chk(dout == iq || dout == iq - 1 || dout == iq + 1, "fs/4 phase 2");
          default: chk(dout == ii || dout == ii - 1 || dout == ii + 1, "fs/4 phase 3");
        endcase
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
