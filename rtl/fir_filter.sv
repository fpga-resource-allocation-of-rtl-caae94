// fir_filter: direct-form FIR with a selectable coefficient table and optional decimation.
//
// One module serves every filter of the modem: the half-band decimator (HB, DECIM = 2),
// the down-link and up-link matched filters (MF_DL, MF_UL) and, behind a zero-stuffer,
// the transmit shaping filters (TX_DL, TX_UL). The tables and their fixed-point scaling are
// in cdma_pkg. On every `in_valid` the new sample enters the delay line; on every DECIM-th
// one the full inner product of the delay line is formed, shifted by the table's Q format,
// saturated to OW bits and registered. Pulse shapes (root-raised-cosine 0.313 down link,
// 0.5 up link) and the decimation factor follow the system description; filter lengths and
// the direct-form structure are this design's choice.
//
// Timing: `out_valid` comes two clocks after the `in_valid` of the last sample it uses.
module fir_filter
  import cdma_pkg::*;
#(
  parameter fir_set_e SET   = FIR_HB,
  parameter int       IW    = 16,
  parameter int       OW    = 16,
  parameter int       DECIM = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] din,
  output logic                 out_valid,
  output logic signed [OW-1:0] dout
);
  localparam int NT = fir_ntaps(SET);
  localparam int SH = fir_shift(SET);
  localparam int DCW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic signed [IW-1:0] taps [NT];
  logic [DCW-1:0]       dcnt;
  logic                 fire;
  logic signed [IW+16:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < NT; k++) acc = acc + (IW+17)'(taps[k] * 16'(fir_coef(SET, k)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NT; k++) taps[k] <= '0;
      dcnt      <= '0;
      fire      <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      fire      <= 1'b0;
      out_valid <= fire;
      if (fire) dout <= OW'(sat((longint'(acc) >>> SH), OW));
      if (in_valid) begin
        taps[0] <= din;
        for (int k = 1; k < NT; k++) taps[k] <= taps[k-1];
        if (int'(dcnt) == DECIM - 1) begin
          dcnt <= '0;
          fire <= 1'b1;
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end
endmodule
