// tb_walsh_gen: checks the Walsh generator against the Hadamard matrix built here by the
// Sylvester doubling rule H(2n) = [[H, H], [H, -H]], checks that the 32 codes are
// mutually orthogonal over a symbol, that each Walsh chip lasts 4 chip strobes, that
// sym_last marks the 128th chip and that restart returns to chip 0.
`timescale 1ns/1ps
module tb_walsh_gen;
  logic clk = 0, rst = 1, chip_en = 0, restart = 0;
  logic [31:0] walsh;
  logic [4:0]  walsh_idx;
  logic        sym_last;
  int checks = 0, failures = 0;
  bit H [32][32];
  int seq [32][32];

  always #5 clk = ~clk;
  walsh_gen dut (.clk, .rst, .chip_en, .restart, .walsh, .walsh_idx, .sym_last);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    // Sylvester construction, 1 = -1
    H[0][0] = 0;
    for (int n = 1; n < 32; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          H[r][c+n]   = H[r][c];
          H[r+n][c]   = H[r][c];
          H[r+n][c+n] = !H[r][c];
        end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int chip = 0; chip < 128; chip++) begin
      @(negedge clk);
      for (int k = 0; k < 32; k++) begin
        chk(walsh[k] == H[k][chip/4], $sformatf("code %0d chip %0d", k, chip));
        if (chip % 4 == 0) seq[k][chip/4] = walsh[k] ? -1 : 1;
      end
      chk(sym_last == (chip == 127), "sym_last");
      chip_en = 1;
      @(negedge clk);
      chip_en = 0;
    end
    chk(walsh_idx == 0, "wrap to chip 0");
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        automatic int dot = 0;
        for (int n = 0; n < 32; n++) dot += seq[a][n] * seq[b][n];
        chk(dot == ((a == b) ? 32 : 0), "orthogonality");
      end
    // advance a few chips then restart
    repeat (13) begin chip_en = 1; @(negedge clk); end
    chip_en = 0;
    chk(walsh_idx == 3, "13 chips = Walsh chip 3");
    restart = 1; @(negedge clk); restart = 0;
    chk(walsh_idx == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
