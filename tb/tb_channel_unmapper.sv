// tb_channel_unmapper: random channel bits with random fill masks, one symbol every
// 20 clocks. Each filled channel must come out as one serial bit, lowest channel first,
// before the next symbol, and nothing may come out for empty channels.
`timescale 1ns/1ps
module tb_channel_unmapper;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, sv = 0;
  logic [N_CH-1:0] cb = 0, fill = 0;
  logic ov, ob;
  int checks = 0, failures = 0;
  bit expq [$];

  always #5 clk = ~clk;
  channel_unmapper dut (.clk, .rst, .sym_valid(sv), .ch_bits(cb), .fill, .out_valid(ov), .out_bit(ob));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int s = 0; s < 1000; s++) begin
      chk(expq.size() == 0, $sformatf("symbol %0d: %0d bits not sent", s, expq.size()));
      expq.delete();
      cb = $urandom;
      fill = (s % 10 == 0) ? '1 : (s % 10 == 1) ? '0 : N_CH'($urandom);
      for (int k = 0; k < N_CH; k++) if (fill[k]) expq.push_back(cb[k]);
      sv = 1;
      @(negedge clk);
      sv = 0;
      cb = ~cb;
      repeat (19) begin
        @(negedge clk);
        if (ov) begin
          chk(expq.size() > 0 && ob == expq[0], $sformatf("symbol %0d bit", s));
          if (expq.size() > 0) void'(expq.pop_front());
        end
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
