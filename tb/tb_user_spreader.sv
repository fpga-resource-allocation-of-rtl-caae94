// tb_user_spreader: random channel bits, enables, Walsh chips, codes and PN chips; the
// expected I and Q sums are formed here with +-1 arithmetic (no XOR short cut). Also
// checks that the outputs hold when chip_en is low.
`timescale 1ns/1ps
module tb_user_spreader;
  logic clk = 0, rst = 1, chip_en = 0, pn_i = 0, pn_q = 0;
  logic [7:0] ch_bits = 0;
  logic [3:0] ch_en = 0;
  logic [31:0] walsh = 0;
  logic [3:0][4:0] code = 0;
  logic signed [3:0] out_i, out_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  user_spreader dut (.clk, .rst, .chip_en, .ch_bits, .ch_en, .walsh, .code, .pn_i, .pn_q, .out_i, .out_q);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic int pm(bit b);
    return b ? -1 : 1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      automatic int ei = 0, eq = 0;
      automatic logic signed [3:0] hold_i, hold_q;
      @(negedge clk);
      ch_bits = $urandom; ch_en = $urandom; walsh = $urandom; pn_i = $urandom; pn_q = $urandom;
      for (int k = 0; k < 4; k++) code[k] = $urandom;
      for (int k = 0; k < 4; k++)
        if (ch_en[k]) begin
          ei += pm(ch_bits[k])   * pm(walsh[code[k]]) * pm(pn_i);
          eq += pm(ch_bits[4+k]) * pm(walsh[code[k]]) * pm(pn_q);
        end
      chip_en = 1;
      @(negedge clk);
      chip_en = 0;
      chk(out_i == ei && out_q == eq, $sformatf("t=%0d got %0d,%0d exp %0d,%0d", t, out_i, out_q, ei, eq));
      hold_i = out_i; hold_q = out_q;
      ch_bits = ~ch_bits;
      @(negedge clk);
      chk(out_i == hold_i && out_q == hold_q, "hold without chip_en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
