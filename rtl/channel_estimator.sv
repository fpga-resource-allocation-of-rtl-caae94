// channel_estimator: pilot-aided complex channel estimate of the down-link receiver.
//
// Over each symbol of SYM_CHIPS chips the received chips are multiplied by the local pilot
// chip (+1/-1) and summed; at the symbol's last chip the sum, divided by SYM_CHIPS (a
// shift), is the estimate h of the pilot as received: its phase is the channel phase and
// its size the pilot amplitude times the channel gain. It feeds the coherent CDMA
// demodulator, the frequency error detector and, through the control processor, the
// transmitter's pre-RAKE. Estimation from the pilot is the system's; integrate-and-dump
// over one symbol is this design's choice.
//
// Timing: `est_valid` pulses one clock after the chip that ends a symbol (`sym_last`);
// h_i/h_q hold until the next estimate. Only chips with `active` high are used.
module channel_estimator
  import cdma_pkg::*;
#(
  parameter int SYM_CHIPS = cdma_pkg::SYM_CHIPS
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    chip_valid,
  input  logic    active,
  input  logic    sym_last,
  input  sample_t chip_i,
  input  sample_t chip_q,
  input  logic    pilot,
  output logic    est_valid,
  output sample_t h_i,
  output sample_t h_q
);
  localparam int SH = $clog2(SYM_CHIPS);
  logic signed [SW+SH:0] acc_i, acc_q, ni, nq;

  assign ni = acc_i + (pilot ? -(SW+SH+1)'(chip_i) : (SW+SH+1)'(chip_i));
  assign nq = acc_q + (pilot ? -(SW+SH+1)'(chip_q) : (SW+SH+1)'(chip_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i     <= '0;
      acc_q     <= '0;
      h_i       <= '0;
      h_q       <= '0;
      est_valid <= 1'b0;
    end else begin
      est_valid <= 1'b0;
      if (chip_valid && active) begin
        if (sym_last) begin
          h_i       <= SW'(sat((longint'(ni) >>> SH), SW));
          h_q       <= SW'(sat((longint'(nq) >>> SH), SW));
          est_valid <= 1'b1;
          acc_i     <= '0;
          acc_q     <= '0;
        end else begin
          acc_i <= ni;
          acc_q <= nq;
        end
      end
    end
  end
endmodule
