// tb_ul_multiplexer: four sources (voice, data, short message, video) offer random bit
// streams with random gaps; one bit period every 4 clocks. Checks that every bit a
// source offers is taken exactly once and in order (src_ready), that the I and Q outputs
// carry the taken bits, that a slot's owner gets the I branch whenever it has a bit, and
// that the slot counter cycles through 8 slots.
`timescale 1ns/1ps
module tb_ul_multiplexer;
  localparam logic [15:0] SI = 16'b10_11_10_00_10_01_10_00;
  logic clk = 0, rst = 1, bit_en = 0;
  logic [3:0] sv = 0, sb = 0, rdy;
  logic bi, bq;
  logic [2:0] slot;
  int checks = 0, failures = 0, n_taken = 0;
  bit seq [4][$];
  int rd [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;
  ul_multiplexer dut (.clk, .rst, .bit_en, .src_valid(sv), .src_bit(sb), .src_ready(rdy),
    .bit_i(bi), .bit_q(bq), .slot);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) for (int k = 0; k < 5000; k++) seq[s].push_back($urandom);
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int owner, n_tk = 0;
      automatic logic [2:0] sl = slot;
      owner = SI[2*sl +: 2];
      for (int s = 0; s < 4; s++) begin
        sv[s] = ($urandom_range(0, 2) != 0);
        sb[s] = seq[s][rd[s]];
      end
      bit_en = 1;
      @(negedge clk);
      bit_en = 0;
      chk(slot == 3'(sl + 1), "slot advances");
      for (int s = 0; s < 4; s++) begin
        if (rdy[s]) begin
          chk(sv[s], "ready only for a valid source");
          n_tk++;
          rd[s]++;
        end
      end
      chk(n_tk == (($countones(sv) >= 2) ? 2 : $countones(sv)), $sformatf("t=%0d takes %0d of %b", t, n_tk, sv));
      if (sv[owner]) chk(rdy[owner] && bi == sb[owner], "owner gets I");
      if (n_tk == 2) begin
        automatic bit x0 = 0, x1 = 0;
        automatic int j = 0;
        for (int s = 0; s < 4; s++) if (rdy[s]) begin if (j == 0) x0 = sb[s]; else x1 = sb[s]; j++; end
        chk((bi == x0 && bq == x1) || (bi == x1 && bq == x0), "outputs carry the taken bits");
      end
      if (n_tk == 1) chk(bi == |(rdy & sb) || bq == |(rdy & sb), "output carries the taken bit");
      n_taken += n_tk;
      repeat (3) begin
        @(negedge clk);
        chk(rdy == 0, "ready only on bit_en");
      end
    end
    chk(n_taken > 4000, "enough bits");
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
