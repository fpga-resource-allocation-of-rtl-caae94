// tb_iq_demod_fs4: random input samples; one clock later I must follow x, 0, -x, 0 and
// Q must follow 0, -x, 0, x from reset. A loop-back through iq_mod_fs4 with constant
// I and Q checks that the pair recovers the baseband values on their own phases.
`timescale 1ns/1ps
module tb_iq_demod_fs4;
  import cdma_pkg::*;
  logic clk = 0, rst = 1;
  conv_t din = 0, oi, oq, ci = 0, cq = 0, mod, li, lq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  iq_demod_fs4 dut (.clk, .rst, .din, .out_i(oi), .out_q(oq));
  iq_mod_fs4 u_mod (.clk, .rst, .in_i(ci), .in_q(cq), .dout(mod));
  iq_demod_fs4 u_lb (.clk, .rst, .din(mod), .out_i(li), .out_q(lq));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      automatic longint ei = 0, eq = 0;
      din = (t % 53 == 0) ? -12'sd2048 : 12'($urandom);
      case (t % 4)
        0: ei = din;
        1: eq = -longint'(din);
        2: ei = -longint'(din);
        default: eq = din;
      endcase
      if (t % 400 == 0) begin ci = 12'($urandom_range(0, 2000)) - 12'sd1000; cq = 12'($urandom_range(0, 2000)) - 12'sd1000; end
      @(negedge clk);
      chk(oi == sat(ei, DW) && oq == sat(eq, DW), $sformatf("t=%0d", t));
      // The modulator output sample at phase p reaches the second demodulator at p+1,
      // which rotates the loop-back by a quarter turn: I comes back on Q and Q on -I.
      if (t % 400 > 4) begin
        if (t % 4 == 1) chk(lq == -ci, $sformatf("loop-back I t=%0d got %0d exp %0d", t, lq, -ci));
        if (t % 4 == 2) chk(li == cq || li == -cq, "loop-back Q magnitude");
      end
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
