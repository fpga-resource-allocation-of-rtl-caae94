// ul_cdma_demod: correlator bank, bit decisions and power measurement of one up-link
// receiver.
//
// The matched-filter outputs arrive at 8 samples per chip. With the code offset `offset`
// (in samples, from the synchronisation blocks) the position in the 256-sample code period
// is p = n - offset, chip c = p / 8. Three correlators run over each period: prompt (the
// sample at the chip centre, p mod 8 = 0), early (2 samples before the centre) and late
// (2 samples after), each multiplying I and Q by the code chip. At the end of the period
// (p = 255, `dump`) the sums are output: the prompt signs are the I and Q bits (the
// carrier phase is taken as aligned, frequency and phase errors being removed through the
// down link), |P_I|+|P_Q| is the energy used for acquisition, the early and late energies
// feed the tracking loop, and P_I^2 + P_Q^2 averaged over 16 bits is the received power
// that the base station reports for power control. Despreading, synchronisation inputs
// and power measurement are the system's; the correlator layout and widths are this
// design's.
//
// Timing: `dump` is a one-clock pulse; outputs hold until the next dump.
module ul_cdma_demod
  import cdma_pkg::*;
#(
  parameter int USER = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  sample_t     in_i,
  input  sample_t     in_q,
  input  logic [7:0]  offset,
  output logic        dump,
  output logic signed [23:0] p_i,
  output logic signed [23:0] p_q,
  output logic [23:0] p_en,
  output logic [23:0] e_en,
  output logic [23:0] l_en,
  output logic        bit_i,
  output logic        bit_q,
  output logic [31:0] power,
  output logic        power_valid
);
  localparam logic [31:0] CODE = ul_code(USER);

  logic [7:0] n, p;
  logic [4:0] c, c_next;
  logic [2:0] sub;
  logic signed [23:0] ap_i, ap_q, ae_i, ae_q, al_i, al_q;
  logic signed [23:0] xi, xq;
  logic signed [23:0] np_i, np_q, ne_i, ne_q, nl_i, nl_q;
  logic [47:0] pw_acc;
  logic [3:0]  pw_cnt;

  assign p      = n - offset;
  assign c      = p[7:3];
  assign sub    = p[2:0];
  assign c_next = c + 5'd1;
  assign xi     = 24'(in_i);
  assign xq     = 24'(in_q);

  function automatic logic signed [23:0] mag(logic signed [23:0] v);
    return v[23] ? -v : v;
  endfunction

  always_comb begin
    np_i = ap_i; np_q = ap_q;
    ne_i = ae_i; ne_q = ae_q;
    nl_i = al_i; nl_q = al_q;
    if (sub == 3'd0) begin
      np_i = ap_i + (CODE[c] ? -xi : xi);
      np_q = ap_q + (CODE[c] ? -xq : xq);
    end
    if (sub == 3'd6) begin
      ne_i = ae_i + (CODE[c_next] ? -xi : xi);
      ne_q = ae_q + (CODE[c_next] ? -xq : xq);
    end
    if (sub == 3'd2) begin
      nl_i = al_i + (CODE[c] ? -xi : xi);
      nl_q = al_q + (CODE[c] ? -xq : xq);
    end
  end

  assign dump = (p == 8'd255);

  always_ff @(posedge clk) begin
    if (rst) begin
      n <= '0;
      {ap_i, ap_q, ae_i, ae_q, al_i, al_q} <= '0;
      {p_i, p_q, p_en, e_en, l_en} <= '0;
      bit_i <= 1'b0;
      bit_q <= 1'b0;
      pw_acc <= '0;
      pw_cnt <= '0;
      power  <= '0;
      power_valid <= 1'b0;
    end else begin
      n <= n + 8'd1;
      power_valid <= 1'b0;
      if (dump) begin
        {ap_i, ap_q, ae_i, ae_q, al_i, al_q} <= '0;
        p_i   <= np_i;
        p_q   <= np_q;
        p_en  <= mag(np_i) + mag(np_q);
        e_en  <= mag(ne_i) + mag(ne_q);
        l_en  <= mag(nl_i) + mag(nl_q);
        bit_i <= np_i[23];
        bit_q <= np_q[23];
        pw_cnt <= pw_cnt + 4'd1;
        if (pw_cnt == 4'd15) begin
          power       <= 32'((pw_acc + 48'(np_i * np_i) + 48'(np_q * np_q)) >> 16);
          power_valid <= 1'b1;
          pw_acc      <= '0;
        end else begin
          pw_acc <= pw_acc + 48'(np_i * np_i) + 48'(np_q * np_q);
        end
      end else begin
        ap_i <= np_i; ap_q <= np_q;
        ae_i <= ne_i; ae_q <= ne_q;
        al_i <= nl_i; al_q <= nl_q;
      end
    end
  end
endmodule
