// tb_diversity_select: random lock flags and powers for the two antenna receivers, held
// for random stretches, with random bit streams. The expected selection (a locked
// receiver first, else the stronger one with a 1/8 hysteresis margin) and the forwarded
// bits are computed here.
`timescale 1ns/1ps
module tb_diversity_select;
  logic clk = 0, rst = 1;
  logic av = 0, ai = 0, aq = 0, al = 0, bv = 0, bi = 0, bq = 0, bl = 0;
  logic [31:0] ap = 0, bp = 0;
  logic sel, sw, ov, oi, oq;
  int checks = 0, failures = 0, n_sw = 0;

  always #5 clk = ~clk;
  diversity_select dut (.clk, .rst, .a_valid(av), .a_bit_i(ai), .a_bit_q(aq), .a_locked(al),
    .a_power(ap), .b_valid(bv), .b_bit_i(bi), .b_bit_q(bq), .b_locked(bl), .b_power(bp),
    .sel, .switched(sw), .bit_valid(ov), .bit_i(oi), .bit_q(oq));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic bit s = 0;
    automatic bit hv = 0, hi = 0, hq = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20000; t++) begin
      automatic bit wb, wa;
      if (t % 50 == 0) begin
        al = $urandom; bl = $urandom;
        ap = $urandom_range(1000, 2000);
        bp = ($urandom_range(0, 1)) ? ap + ap / 10 : $urandom_range(1000, 2400);
        if (t % 1000 == 0) ap = 32'hFFFF_FFF0;
      end
      av = $urandom; bv = $urandom; ai = $urandom; aq = $urandom; bi = $urandom; bq = $urandom;
      wb = bl && (!al || (33'(bp) > 33'(ap) + 33'(ap >> 3)));
      wa = al && (!bl || (33'(ap) > 33'(bp) + 33'(bp >> 3)));
      #1;
      chk(sw == ((!s && wb) || (s && wa)), "switched");
      if (s ? bv : av) begin hi = s ? bi : ai; hq = s ? bq : aq; end
      hv = s ? bv : av;
      if (sw) begin s = !s; n_sw++; end
      @(negedge clk);
      chk(sel == s, "sel");
      chk(ov == hv && oi == hi && oq == hq, "forwarded bits");
    end
    chk(n_sw > 20, "switches exercised");
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
