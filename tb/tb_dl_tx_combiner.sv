// tb_dl_tx_combiner: random user chips (including values that overflow the 12-bit output),
// pilot and BPCH chips and gains; the expected sums, shift by 1 and saturation are
// computed here.
`timescale 1ns/1ps
module tb_dl_tx_combiner;
  import cdma_pkg::*;
  localparam int NU = 16;
  logic clk = 0, rst = 1, chip_en = 0;
  sample_t ui [NU];
  sample_t uq [NU];
  logic pich = 0, bi = 0, bq = 0;
  logic [10:0] pg = 0, bg = 0;
  conv_t oi, oq;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;
  dl_tx_combiner dut (.clk, .rst, .chip_en, .user_i(ui), .user_q(uq), .pich_chip(pich),
    .bpch_chip_i(bi), .bpch_chip_q(bq), .pich_gain(pg), .bpch_gain(bg), .out_i(oi), .out_q(oq));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic int sat12(longint v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : int'(v);
  endfunction

  initial begin
    for (int u = 0; u < NU; u++) begin ui[u] = 0; uq[u] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      automatic longint ei, eq;
      automatic int amp = (t % 3 == 0) ? 2000 : 300;
      @(negedge clk);
      pich = $urandom; bi = $urandom; bq = $urandom; pg = $urandom; bg = $urandom;
      ei = pich ? -longint'(pg) : longint'(pg);
      ei += bi ? -longint'(bg) : longint'(bg);
      eq = bq ? -longint'(bg) : longint'(bg);
      for (int u = 0; u < NU; u++) begin
        ui[u] = SW'($signed($urandom_range(0, 2*amp)) - amp);
        uq[u] = SW'($signed($urandom_range(0, 2*amp)) - amp);
        ei += ui[u];
        eq += uq[u];
      end
      chip_en = 1;
      @(negedge clk);
      chip_en = 0;
      chk(oi == sat12(ei >>> 1) && oq == sat12(eq >>> 1), $sformatf("t=%0d", t));
      if (sat12(ei >>> 1) != (ei >>> 1)) n_sat++;
    end
    chk(n_sat > 0, "saturation exercised");
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
