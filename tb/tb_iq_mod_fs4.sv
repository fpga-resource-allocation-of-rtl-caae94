// tb_iq_mod_fs4: random I and Q each clock; the output one clock later must follow the
// sequence I, -Q, -I, Q starting at reset, with -(-2048) saturated to 2047.
`timescale 1ns/1ps
module tb_iq_mod_fs4;
  import cdma_pkg::*;
  logic clk = 0, rst = 1;
  conv_t in_i = 0, in_q = 0, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  iq_mod_fs4 dut (.clk, .rst, .in_i, .in_q, .dout);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      automatic longint e;
      in_i = (t % 97 == 0) ? -12'sd2048 : 12'($urandom);
      in_q = (t % 89 == 0) ? -12'sd2048 : 12'($urandom);
      case (t % 4)
        0: e = in_i;
        1: e = -longint'(in_q);
        2: e = -longint'(in_i);
        default: e = in_q;
      endcase
      @(negedge clk);
      chk(dout == sat(e, DW), $sformatf("t=%0d got %0d exp %0d", t, dout, e));
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
