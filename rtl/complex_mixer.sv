// complex_mixer: the AFC de-rotator of the down-link receiver.
//
// Multiplies each complex base-band sample by the conjugate of the NCO phasor,
// y = x * (cos - j sin): y_i = x_i cos + x_q sin, y_q = x_q cos - x_i sin, with cos/sin in
// Q11 (2047 ~ 1.0). A positive NCO frequency therefore removes a positive frequency offset.
// The frequency correction at base band follows the system description; widths are this
// design's choice.
//
// Timing: registered; `out_valid` follows `in_valid` by one clock.
module complex_mixer
  import cdma_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  sample_t            in_i,
  input  sample_t            in_q,
  input  logic signed [11:0] cos_i,
  input  logic signed [11:0] sin_i,
  output logic               out_valid,
  output sample_t            out_i,
  output sample_t            out_q
);
  logic signed [28:0] yi, yq;

  assign yi = 29'(in_i * cos_i) + 29'(in_q * sin_i);
  assign yq = 29'(in_q * cos_i) - 29'(in_i * sin_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= SW'(sat((longint'(yi) >>> 11), SW));
        out_q <= SW'(sat((longint'(yq) >>> 11), SW));
      end
    end
  end
endmodule
