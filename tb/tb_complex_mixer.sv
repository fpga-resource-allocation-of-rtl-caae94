// tb_complex_mixer: random samples and random or full-scale cos/sin pairs with random
// in_valid; the expected (I + jQ)(cos - j sin) / 2048 products, with floor rounding and
// 16-bit saturation, are computed here. Outputs must hold while in_valid is low.
`timescale 1ns/1ps
module tb_complex_mixer;
  import cdma_pkg::*;
  logic clk = 0, rst = 1, vin = 0;
  sample_t ii = 0, iq = 0, oi, oq;
  logic signed [11:0] c = 0, s = 0;
  logic vout;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;
  complex_mixer dut (.clk, .rst, .in_valid(vin), .in_i(ii), .in_q(iq), .cos_i(c), .sin_i(s),
                     .out_valid(vout), .out_i(oi), .out_q(oq));

  task automatic chk(bit cond, string m);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 5000; t++) begin
      automatic longint ei, eq;
      automatic sample_t hi = oi, hq = oq;
      vin = $urandom;
      ii = 16'($urandom); iq = 16'($urandom);
      if (t % 5 == 0) begin c = -12'sd2048; s = -12'sd2048; end
      else begin c = 12'($urandom); s = 12'($urandom); end
      ei = (longint'(ii) * c + longint'(iq) * s) >>> 11;
      eq = (longint'(iq) * c - longint'(ii) * s) >>> 11;
      @(negedge clk);
      chk(vout == vin, "valid follows");
      if (vin) begin
        chk(oi == sat(ei, SW) && oq == sat(eq, SW), $sformatf("t=%0d", t));
        if (sat(ei, SW) != ei) n_sat++;
      end else begin
        chk(oi == hi && oq == hq, "hold");
      end
    end
    chk(n_sat > 0, "saturation exercised");
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
