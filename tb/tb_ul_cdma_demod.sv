// tb_ul_cdma_demod: drives base-band I/Q with rectangular chips of user 3's code, 8
// samples per chip, amplitude 100, delayed by D = 77 samples, carrying random I and Q
// bits. With the offset set to D the checks are: the prompt decisions equal the sent
// bits, the prompt energy is the full 2*32*100, the late correlator (inside the same
// chip) matches it, the early one (straddling the next chip) is smaller, and the power
// report after 16 bits is sum(P_I^2 + P_Q^2) >> 16. With the offset 3 chips off, the
// prompt energy must drop below a third of the aligned value.
`timescale 1ns/1ps
module tb_ul_cdma_demod;
  import cdma_pkg::*;
  localparam int D = 77, USER = 3, A = 100;
  localparam logic [31:0] CODE = ul_code(USER);
  logic clk = 0, rst = 1;
  sample_t ii = 0, iq = 0;
  logic [7:0] offset = 8'(D);
  logic dump, bi, bq, pv;
  logic signed [23:0] p_i, p_q;
  logic [23:0] p_en, e_en, l_en;
  logic [31:0] power;
  int checks = 0, failures = 0, n_bits = 0, n_pow = 0;
  bit txi [$], txq [$];

  always #5 clk = ~clk;
  ul_cdma_demod #(.USER(USER)) dut (.clk, .rst, .in_i(ii), .in_q(iq), .offset, .dump, .p_i, .p_q,
    .p_en, .e_en, .l_en, .bit_i(bi), .bit_q(bq), .power, .power_valid(pv));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    for (int b = 0; b < 200; b++) begin txi.push_back($urandom); txq.push_back($urandom); end
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int m = 0; m < 200 * 256; m++) begin
      automatic int r = m - D, b, c;
      automatic bit last_dump;
      if (r < 0) begin ii = 0; iq = 0; end
      else begin
        b = r / 256;
        c = (r % 256) / 8;
        ii = 16'((txi[b] ^ CODE[c]) ? -A : A);
        iq = 16'((txq[b] ^ CODE[c]) ? -A : A);
      end
      if (m == 150 * 256) offset = 8'(D + 24);
      last_dump = dump;
      @(negedge clk);
      // Dump at sample m closes bit (m - D) / 256.
      if (last_dump && r >= 255) begin
        automatic int bb = (r - 255) / 256;
        if (m < 150 * 256) begin
          n_bits++;
          chk(bi == txi[bb] && bq == txq[bb], $sformatf("bit %0d", bb));
          chk(p_en == 2 * 32 * A && l_en == p_en && e_en < p_en, $sformatf("energies %0d %0d %0d", p_en, e_en, l_en));
        end else if (m > 152 * 256) begin
          chk(p_en < 2 * 32 * A / 3, $sformatf("misaligned energy %0d", p_en));
        end
      end
      if (pv && m < 150 * 256) begin
        n_pow++;
        // The first report also covers the partial period before the signal arrived.
        if (n_pow > 1) chk(power == (16 * 2 * (32 * A) * (32 * A)) >> 16, $sformatf("power %0d", power));
      end
    end
    chk(n_bits > 140 && n_pow > 7, "enough bits and power reports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 256 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
