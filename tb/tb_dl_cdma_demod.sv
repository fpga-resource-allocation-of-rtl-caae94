// tb_dl_cdma_demod: builds received chips for four QPSK channels on four Walsh codes,
// scrambled by random I and Q PN chips and rotated by a complex channel h, with noise
// and random chip_valid gaps. Checks the soft outputs against integrate-and-dump sums
// computed here (derotation by conj(h) >> 8, despreading, sum over 128 chips) and that
// the hard bits equal the transmitted ones.
`timescale 1ns/1ps
module tb_dl_cdma_demod;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, cv = 0, act = 0, last = 0, pn_i = 0, pn_q = 0;
  sample_t ci = 0, cq = 0, hi = 0, hq = 0;
  logic [31:0] walsh = 0;
  logic [3:0][4:0] code;
  logic sv;
  logic [7:0] bits;
  logic signed [3:0][23:0] si, sq;
  int checks = 0, failures = 0, n_sym = 0;

  always #5 clk = ~clk;
  dl_cdma_demod dut (.clk, .rst, .chip_valid(cv), .active(act), .sym_last(last), .chip_i(ci),
    .chip_q(cq), .h_i(hi), .h_q(hq), .pn_i, .pn_q, .walsh, .code, .sym_valid(sv), .bits,
    .soft_i(si), .soft_q(sq));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    automatic longint ai [4] = '{0, 0, 0, 0};
    automatic longint aq [4] = '{0, 0, 0, 0};
    automatic logic [7:0] tx = 0;
    automatic int k = 0;
    code[0] = 5'd3; code[1] = 5'd9; code[2] = 5'd17; code[3] = 5'd30;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    act = 1;
    for (int t = 0; t < 80000; t++) begin
      automatic longint xi = 0, xq = 0, yi, yq;
      automatic bit take;
      cv = ($urandom_range(0, 1) == 0);
      if (k == 0) begin
        tx = $urandom;
        hi = 16'($urandom_range(100, 300));
        hq = 16'($signed($urandom_range(0, 400)) - 200);
      end
      pn_i = $urandom; pn_q = $urandom;
      for (int w = 0; w < 32; w++) walsh[w] = walsh_chip(5'(w), 5'((k / 4) % 32));
      for (int c = 0; c < 4; c++) begin
        xi += (tx[c]   ^ walsh[code[c]] ^ pn_i) ? -100 : 100;
        xq += (tx[4+c] ^ walsh[code[c]] ^ pn_q) ? -100 : 100;
      end
      ci = 16'(((hi * xi - hq * xq) >>> 8) + $signed($urandom_range(0, 100)) - 50);
      cq = 16'(((hi * xq + hq * xi) >>> 8) + $signed($urandom_range(0, 100)) - 50);
      last = (k == SYM_CHIPS - 1);
      yi = sat((longint'(ci) * hi + longint'(cq) * hq) >>> 8, 24);
      yq = sat((longint'(cq) * hi - longint'(ci) * hq) >>> 8, 24);
      take = cv;
      if (take)
        for (int c = 0; c < 4; c++) begin
          ai[c] = longint'(24'(ai[c] + ((pn_i ^ walsh[code[c]]) ? -yi : yi)));
          aq[c] = longint'(24'(aq[c] + ((pn_q ^ walsh[code[c]]) ? -yq : yq)));
          ai[c] = ai[c] - ((ai[c] >= (1 <<< 23)) ? (1 <<< 24) : 0);
          aq[c] = aq[c] - ((aq[c] >= (1 <<< 23)) ? (1 <<< 24) : 0);
        end
      @(negedge clk);
      if (take && last) begin
        n_sym++;
        chk(sv, "sym_valid");
        for (int c = 0; c < 4; c++) begin
          chk($signed(si[c]) == ai[c] && $signed(sq[c]) == aq[c], $sformatf("soft sym %0d ch %0d got %0d,%0d exp %0d,%0d", n_sym, c, si[c], sq[c], ai[c], aq[c]));
          ai[c] = 0; aq[c] = 0;
        end
        chk(bits == tx, $sformatf("bits sym %0d got %h sent %h", n_sym, bits, tx));
      end else begin
        chk(!sv, "no spurious sym_valid");
      end
      if (take) k = (k + 1) % SYM_CHIPS;
    end
    chk(n_sym > 200, "enough symbols");
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
