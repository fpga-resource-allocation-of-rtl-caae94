// tb_channel_mapper: sends random bits through the valid/ready port between symbol
// strobes and checks that after each strobe channel k carries bit k of the group, that
// the fill mask shows how many bits came, that ready drops after 8 bits and during the
// strobe, and that a partly filled group sends zeros on the empty channels.
`timescale 1ns/1ps
module tb_channel_mapper;
  logic clk = 0, rst = 1, in_valid = 0, in_bit = 0, sym_strobe = 0;
  logic in_ready;
  logic [7:0] ch_bits, ch_fill;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  channel_mapper dut (.clk, .rst, .in_valid, .in_bit, .in_ready, .sym_strobe, .ch_bits, .ch_fill);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int g = 0; g < 200; g++) begin
      automatic int nb = (g % 5 == 0) ? ($urandom % 8) : 8;
      automatic logic [7:0] sent = '0, fill = '0;
      automatic int k = 0;
      while (k < nb) begin
        @(negedge clk);
        in_valid = 1;
        in_bit = $urandom;
        #1;
        if (in_ready) begin sent[k] = in_bit; fill[k] = 1; k++; end
        @(posedge clk);
        #1;
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 0;
      chk(in_ready == (nb < 8), "ready vs fill");
      sym_strobe = 1;
      #1 chk(!in_ready, "not ready during strobe");
      @(negedge clk);
      sym_strobe = 0;
      chk(ch_bits == sent, $sformatf("group %0d bits %b vs %b", g, ch_bits, sent));
      chk(ch_fill == fill, "fill");
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
