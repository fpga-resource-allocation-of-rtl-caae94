// chip_sync: chip-timing recovery and the "down 4" decimator of the down-link receiver.
//
// After the matched filter there are 4 samples per chip. For each of the 4 sample phases
// the module accumulates |I| + |Q| over WIN chips; at the end of each window the phase
// with the largest sum (the one nearest the Nyquist-pulse peak) becomes the sampling
// phase, and only samples of that phase are passed on as chips. The chip-synchronism task
// and the decimation by 4 are the system's; the energy criterion and window are this
// design's choice.
//
// Timing: `chip_valid` is a one-clock pulse, registered one clock after the selected input
// sample. The phase starts at 0 and may change only at a window boundary.
module chip_sync
  import cdma_pkg::*;
#(
  parameter int SPC = 4,
  parameter int WIN = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  sample_t     in_i,
  input  sample_t     in_q,
  output logic        chip_valid,
  output sample_t     chip_i,
  output sample_t     chip_q,
  output logic [$clog2(SPC)-1:0] phase
);
  localparam int PW = $clog2(SPC);
  localparam int AW = SW + $clog2(WIN) + 2;
  localparam int WW = $clog2(WIN);

  logic [PW-1:0] ph;
  logic [WW-1:0] wcnt;
  logic [AW-1:0] en_acc [SPC];
  logic [SW:0]   mag;
  logic [PW-1:0] best;

  assign mag = (SW+1)'(in_i[SW-1] ? -in_i : in_i) + (SW+1)'(in_q[SW-1] ? -in_q : in_q);

  always_comb begin
    best = '0;
    for (int p = 1; p < SPC; p++)
      if (en_acc[p] > en_acc[best]) best = PW'(p);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph         <= '0;
      wcnt       <= '0;
      phase      <= '0;
      chip_valid <= 1'b0;
      chip_i     <= '0;
      chip_q     <= '0;
      for (int p = 0; p < SPC; p++) en_acc[p] <= '0;
    end else begin
      chip_valid <= 1'b0;
      if (in_valid) begin
        ph <= ph + 1'b1;
        en_acc[ph] <= en_acc[ph] + AW'(mag);
        if (ph == phase) begin
          chip_valid <= 1'b1;
          chip_i     <= in_i;
          chip_q     <= in_q;
        end
        if (ph == PW'(SPC - 1)) begin
          if (wcnt == WW'(WIN - 1)) begin
            wcnt  <= '0;
            phase <= best;
            for (int p = 0; p < SPC; p++) en_acc[p] <= '0;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
