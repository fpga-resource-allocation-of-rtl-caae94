// tb_ul_sync_track: random early and late energies, with the early one made larger,
// smaller or equal for stretches. Over each group of 8 dumps the expected decision
// (dec if the early sum exceeds the late sum by more than 1/16 of their total, inc in the
// opposite case, nothing otherwise) is computed here and compared with the one-clock
// inc/dec pulses. Dropping locked must clear the running sums.
`timescale 1ns/1ps
module tb_ul_sync_track;
  logic clk = 0, rst = 1, locked = 0, dump = 0;
  logic [23:0] e = 0, l = 0;
  logic inc, dec;
  int checks = 0, failures = 0, n_inc = 0, n_dec = 0;

  always #5 clk = ~clk;
  ul_sync_track dut (.clk, .rst, .locked, .dump, .e_en(e), .l_en(l), .inc, .dec);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic longint d = 0, tot = 0;
    automatic int cnt = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    locked = 1;
    for (int t = 0; t < 4000; t++) begin
      automatic int mode = (t / 200) % 3;
      automatic bit want_i = 0, want_d = 0;
      if (t % 700 == 699) begin
        locked = 0;
        @(negedge clk);
        locked = 1;
        d = 0; tot = 0; cnt = 0;
      end
      e = 24'($urandom_range(1000, 5000));
      l = 24'($urandom_range(1000, 5000));
      if (mode == 0) e = e + 24'd3000;
      if (mode == 1) l = l + 24'd3000;
      dump = 1;
      d += longint'(e) - longint'(l);
      tot += longint'(e) + longint'(l);
      if (cnt == 7) begin
        want_d = d > (tot >>> 4);
        want_i = !want_d && (-d > (tot >>> 4));
        d = 0; tot = 0; cnt = 0;
      end else cnt++;
      @(negedge clk);
      dump = 0;
      chk(inc == want_i && dec == want_d, $sformatf("t=%0d inc %0d dec %0d", t, inc, dec));
      n_inc += inc; n_dec += dec;
      @(negedge clk);
      chk(!inc && !dec, "one-clock pulses");
    end
    chk(n_inc > 10 && n_dec > 10, "both directions seen");
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
