// tb_pre_rake: random complex chips, taps and weights; the expected output
// w * sum_l c_l x[n - l*D] / 64 is computed here from a history of the inputs. Runs with
// the default two taps 2 chips apart and with three taps 1 chip apart.
`timescale 1ns/1ps
module tb_pre_rake;
  logic clk = 0, rst = 1, chip_en = 0;
  logic signed [3:0] in_i = 0, in_q = 0;
  logic signed [1:0][7:0] ci2 = 0, cq2 = 0;
  logic signed [2:0][7:0] ci3 = 0, cq3 = 0;
  logic [7:0] weight = 0;
  logic signed [15:0] o2i, o2q, o3i, o3q;
  int checks = 0, failures = 0;
  int hi [$], hq [$];

  always #5 clk = ~clk;
  pre_rake dut2 (.clk, .rst, .chip_en, .in_i, .in_q, .coef_i(ci2), .coef_q(cq2), .weight,
                 .out_i(o2i), .out_q(o2q));
  pre_rake #(.N_TAPS(3), .TAP_DELAY(1)) dut3 (.clk, .rst, .chip_en, .in_i, .in_q, .coef_i(ci3),
                 .coef_q(cq3), .weight, .out_i(o3i), .out_q(o3q));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    for (int k = 0; k < 8; k++) begin hi.push_front(0); hq.push_front(0); end
    repeat (2) @(posedge clk);
    rst <= 0;
    weight = 64;
    for (int t = 0; t < 3000; t++) begin
      automatic longint ai = 0, aq = 0, bi = 0, bq = 0;
      @(negedge clk);
      in_i = 4'($signed($urandom_range(0, 8)) - 4);
      in_q = 4'($signed($urandom_range(0, 8)) - 4);
      if (t % 50 == 0) begin
        ci2 = $urandom; cq2 = $urandom; ci3 = $urandom; cq3 = $urandom; weight = $urandom;
      end
      hi.push_front(in_i); hq.push_front(in_q);
      for (int l = 0; l < 2; l++) begin
        ai += hi[2*l] * $signed(ci2[l]) - hq[2*l] * $signed(cq2[l]);
        aq += hi[2*l] * $signed(cq2[l]) + hq[2*l] * $signed(ci2[l]);
      end
      for (int l = 0; l < 3; l++) begin
        bi += hi[l] * $signed(ci3[l]) - hq[l] * $signed(cq3[l]);
        bq += hi[l] * $signed(cq3[l]) + hq[l] * $signed(ci3[l]);
      end
      chip_en = 1;
      @(negedge clk);
      chip_en = 0;
      if (t > 5) begin
        chk(o2i == sat16((ai * longint'(weight)) >>> 6) && o2q == sat16((aq * longint'(weight)) >>> 6),
            $sformatf("2-tap t=%0d got %0d,%0d", t, o2i, o2q));
        chk(o3i == sat16((bi * longint'(weight)) >>> 6) && o3q == sat16((bq * longint'(weight)) >>> 6), "3-tap");
      end
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
