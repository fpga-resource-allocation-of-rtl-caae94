// tb_dl_bs_tx: down-link transmitter with 2 users and a 256-chip frame.
//
// Part 1, pilot only (no user channels, BPCH gain 0): the DAC stream must equal, at one
// fixed latency, a reference built here from first principles: the frame's PN1 chips
// (own LFSR recurrence) at +-pich_gain/2, zero-stuffed to 8 samples per chip, passed
// through the down-link shaping taps and put on the fs/4 carrier (I only, so every other
// DAC sample is zero). Frame starts must be FRAME*8 clocks apart and symbol strobes
// 1024 clocks apart.
// Part 2, users on: each user's bit source must be drained at 8 bits (4 QPSK channels)
// per symbol, and the DAC must now carry energy on the Q phases as well.
`timescale 1ns/1ps
module tb_dl_bs_tx;
  import cdma_pkg::*;
  localparam int NU = 2, FR = 256, NS = 2 * FR * 8;
  logic clk = 0, rst = 1;
  logic [NU-1:0] uv = '1, ub = 0, ur;
  logic [NU-1:0][3:0] ch_en = '0;
  logic [NU-1:0][3:0][4:0] code;
  logic signed [NU-1:0][1:0][7:0] ci = '0, cq = '0;
  logic [NU-1:0][7:0] weight = '{8'd64, 8'd64};
  logic [10:0] pg = 11'd1000, bg = 11'd0;
  conv_t dac;
  logic fstart, sstrobe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dl_bs_tx #(.N_USERS(NU), .FRAME_CHIPS(FR)) dut (.clk, .rst, .user_valid(uv), .user_bit(ub),
    .user_ready(ur), .ch_en, .code, .coef_i(ci), .coef_q(cq), .weight, .pich_gain(pg),
    .bpch_gain(bg), .bpch_code(5'd31), .bpch_bit(1'b0), .dac, .frame_start(fstart),
    .sym_strobe(sstrobe));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  bit pn [FR];
  function automatic void build_pn();
    bit a [FR + 18];
    bit b [FR + 18];
    for (int i = 0; i < 18; i++) begin a[i] = SEED_PN1[i]; b[i] = DL_SEED_B[i]; end
    for (int n = 0; n < FR; n++) begin
      a[n+18] = a[n+7] ^ a[n];
      b[n+18] = b[n+10] ^ b[n+7] ^ b[n+5] ^ b[n];
      pn[n] = a[n] ^ b[n];
    end
  endfunction

  // Captured DAC samples from the first frame start, and the clock phase (mod 4) there.
  conv_t cap [NS + 200];
  longint x [NS + 200];
  longint ref_i [NS + 200];
  int tclk = 0;
  always @(posedge clk) if (!rst) tclk++;

  initial begin
    automatic int t0, ph0, last_fs = -1, last_ss = -1, n_fs = 0, n_ss = 0, n_match = 0, lag = -1;
    automatic int cnt [NU] = '{0, 0};
    automatic bit q_energy = 0;
    code[0] = {5'd4, 5'd3, 5'd2, 5'd1};
    code[1] = {5'd8, 5'd7, 5'd6, 5'd5};
    ci[0][0] = 8'sd64; ci[1][0] = 8'sd64;
    build_pn();
    repeat (3) @(negedge clk);
    rst = 0;
    // Part 1
    do @(negedge clk); while (!fstart);
    t0 = tclk; ph0 = tclk % 4;
    for (int k = 0; k < NS + 200; k++) begin
      cap[k] = dac;
      if (fstart) begin
        if (last_fs >= 0) chk(k - last_fs == FR * 8, $sformatf("frame period %0d", k - last_fs));
        last_fs = k; n_fs++;
      end
      if (sstrobe) begin
        if (last_ss >= 0) chk(k - last_ss == SYM_CHIPS * 8, "symbol period");
        last_ss = k; n_ss++;
      end
      @(negedge clk);
    end
    for (int k = 0; k < NS + 200; k++) x[k] = (k % 8 == 0) ? (pn[(k / 8) % FR] ? -500 : 500) : 0;
    for (int k = 0; k < NS + 200; k++) begin
      automatic longint a = 0;
      for (int j = 0; j < fir_ntaps(FIR_TX_DL) && j <= k; j++) a += x[k-j] * fir_coef(FIR_TX_DL, j);
      ref_i[k] = sat(a >>> fir_shift(FIR_TX_DL), DW);
    end
    // Find the latency (in clocks, searched over -8..80) at which DAC = modulated reference.
    for (int l = -8; l <= 80; l++) begin
      automatic bit ok = 1;
      for (int k = 100; k < NS; k++) begin
        automatic int r = k - l;
        automatic longint e;
        case ((ph0 + 3 + k) % 4)
          0: e = ref_i[r];
          2: e = -ref_i[r];
          default: e = 0;
        endcase
        if (r < 0 || longint'(cap[k]) != sat(e, DW)) begin ok = 0; break; end
      end
      if (ok) begin n_match++; lag = l; end
    end
    chk(n_match == 1, $sformatf("pilot-only DAC matches the reference at %0d latencies", n_match));
    $display("pilot latency %0d clocks after frame_start", lag);
    chk(n_fs >= 2 && n_ss >= 4, "frame and symbol strobes seen");
    // Part 2
    ch_en = '{4'h3, 4'hF};
    bg = 11'd200;
    repeat (2000) @(negedge clk);
    for (int k = 0; k < 4 * 1024; k++) begin
      ub = $urandom;
      for (int u = 0; u < NU; u++) if (ur[u]) cnt[u]++;
      if (tclk % 2 == 0 && dac != 0) q_energy = 1;
      @(negedge clk);
    end
    for (int u = 0; u < NU; u++)
      chk(cnt[u] >= 31 && cnt[u] <= 33, $sformatf("user %0d drained %0d bits in 4 symbols", u, cnt[u]));
    chk(q_energy, "Q carries the users");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
