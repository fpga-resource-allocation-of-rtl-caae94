// cdma_pkg: constants, types and tables shared by the DS-CDMA indoor modem.
//
// Rates: one clock at the 32768 kHz sample rate, chips at 4096 kchip/s (8 samples per
// chip), down-link Walsh chips at 1024 kchip/s (4 PN chips each), 32-chip Walsh codes, so a
// 32 kbit/s channel symbol lasts 128 chips; 10 ms frames hold 40960 chips. These numbers are
// the system's own. Word widths, filter lengths, the Gold polynomials and the fixed-point
// scalings below are this design's choices.
//
// Chips and bits use the convention 0 -> +1, 1 -> -1, so the product of chips is an XOR.
//
// Filter tables (integers, rounded):
//   TX_DL / TX_UL : root-raised-cosine, roll-off 0.313 / 0.5, 8 samples per chip, +-3 chips
//                   (49 taps), scaled so every polyphase branch sums to 2048 (Q11 gain 1).
//   MF_DL         : root-raised-cosine 0.313 at 4 samples/chip, 25 taps, scaled so that
//                   TX_DL (taken every 2nd tap) followed by MF_DL peaks at 1.0 in Q12.
//   MF_UL         : root-raised-cosine 0.5 at 8 samples/chip, 49 taps, scaled so that TX_UL
//                   followed by MF_UL peaks at 2.0 in Q12 (compensates the zero samples
//                   left by the fs/4 I/Q separation).
//   HB            : 11-tap half-band, Hamming-windowed sinc(n/2)/2, scaled to DC gain 2.0 in
//                   Q12 (same compensation).
//   SIN           : SIN[k] = round(2047 * sin(pi/2 * k/64)), k = 0..64 (quarter wave).
package cdma_pkg;

  localparam int FS_KSPS      = 32768;
  localparam int CHIP_KCPS    = 4096;
  localparam int SPC          = 8;      // samples per chip at fs
  localparam int WALSH_LEN    = 32;
  localparam int PN_PER_WALSH = 4;
  localparam int SYM_CHIPS    = WALSH_LEN * PN_PER_WALSH;  // 128
  localparam int FRAME_CHIPS  = 40960;  // 10 ms
  localparam int N_USERS      = 16;
  localparam int N_CH         = 8;      // 4 QPSK channels = 4 I + 4 Q bit channels
  localparam int UL_SF        = 32;     // up-link chips per bit

  // Down-link Gold pair (degree 18) and up-link Gold pair (degree 5), tap masks of the
  // Fibonacci recurrence a[n+DEG] = xor of a[n+i] for every set bit i.
  localparam int          DL_DEG    = 18;
  localparam logic [17:0] DL_MASK_A = 18'h00081;   // x^18 + x^7 + 1
  localparam logic [17:0] DL_MASK_B = 18'h004A1;   // x^18 + x^10 + x^7 + x^5 + 1
  localparam logic [17:0] DL_SEED_B = 18'h3FFFF;
  localparam logic [17:0] SEED_PN1   = 18'h00010;
  localparam logic [17:0] SEED_PN2   = 18'h01000;
  localparam logic [4:0]  UL_MASK_A = 5'h05;       // x^5 + x^2 + 1
  localparam logic [4:0]  UL_MASK_B = 5'h1D;       // x^5 + x^4 + x^3 + x^2 + 1

  localparam int SW = 16;   // internal sample width
  localparam int DW = 12;   // DAC / ADC width

  typedef logic signed [SW-1:0] sample_t;
  typedef logic signed [DW-1:0] conv_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } cplx_t;

  typedef enum logic [2:0] {FIR_TX_DL, FIR_TX_UL, FIR_MF_DL, FIR_MF_UL, FIR_HB} fir_set_e;

  localparam int TX_DL_C [49] = '{-64, -50, -18, 28, 81, 128, 157, 155, 116, 39, -69, -190, -303,
    -379, -393, -324, -158, 103, 444, 838, 1247, 1627, 1936, 2137, 2207, 2137, 1936, 1627, 1247,
    838, 444, 103, -158, -324, -393, -379, -303, -190, -69, 39, 116, 155, 157, 128, 81, 28, -18,
    -50, -64};
  localparam int TX_UL_C [49] = '{6, -16, -34, -41, -31, -5, 32, 68, 88, 78, 32, -50, -155, -257,
    -324, -321, -219, -3, 324, 738, 1195, 1640, 2013, 2261, 2348, 2261, 2013, 1640, 1195, 738,
    324, -3, -219, -321, -324, -257, -155, -50, 32, 78, 88, 68, 32, -5, -31, -41, -34, -16, 6};
  localparam int MF_DL_C [25] = '{-32, -9, 41, 80, 59, -35, -154, -200, -80, 226, 633, 983, 1121,
    983, 633, 226, -80, -200, -154, -35, 59, 80, 41, -9, -32};
  localparam int MF_UL_C [49] = '{3, -8, -17, -20, -15, -2, 16, 33, 43, 39, 16, -25, -76, -126,
    -159, -158, -108, -2, 159, 363, 588, 807, 990, 1112, 1155, 1112, 990, 807, 588, 363, 159, -2,
    -108, -158, -159, -126, -76, -25, 16, 39, 43, 33, 16, -2, -15, -20, -17, -8, 3};
  localparam int HB_C [11] = '{41, 0, -344, 0, 2363, 4070, 2363, 0, -344, 0, 41};
  localparam int SIN_C [65] = '{0, 50, 100, 151, 201, 251, 300, 350, 399, 449, 497, 546, 594, 642,
    690, 737, 783, 830, 875, 920, 965, 1009, 1052, 1095, 1137, 1179, 1219, 1259, 1299, 1337, 1375,
    1411, 1447, 1483, 1517, 1550, 1582, 1614, 1644, 1674, 1702, 1729, 1756, 1781, 1805, 1828,
    1850, 1871, 1891, 1910, 1927, 1944, 1959, 1973, 1986, 1997, 2008, 2017, 2025, 2032, 2037,
    2041, 2045, 2046, 2047};

  function automatic int fir_ntaps(fir_set_e s);
    case (s)
      FIR_MF_DL: return 25;
      FIR_HB:    return 11;
      default:   return 49;
    endcase
  endfunction

  // Right shift applied to the accumulator (Q format of the table).
  function automatic int fir_shift(fir_set_e s);
    return (s == FIR_TX_DL || s == FIR_TX_UL) ? 11 : 12;
  endfunction

  function automatic int fir_coef(fir_set_e s, int k);
    case (s)
      FIR_TX_DL: return TX_DL_C[k];
      FIR_TX_UL: return TX_UL_C[k];
      FIR_MF_DL: return MF_DL_C[k];
      FIR_MF_UL: return MF_UL_C[k];
      default:   return HB_C[k];
    endcase
  endfunction

  // Saturate an integer to a signed field of the given width.
  function automatic longint sat(longint v, int w);
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    longint lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Chip n (0..31) of Walsh/Hadamard code k (0..31), 1 = -1 (Sylvester construction).
  function automatic logic walsh_chip(logic [4:0] k, logic [4:0] n);
    return ^(k & n);
  endfunction

  // 32-chip up-link code of user u: chips 0..30 are a Gold sequence (sequence A xor
  // sequence B started u+1 steps later), chip 31 repeats chip 0.
  function automatic logic [31:0] ul_code(int u);
    logic [4:0] a, b;
    logic [31:0] c;
    a = 5'h01;
    b = 5'h1F;
    for (int s = 0; s <= u; s++) b = {^(b & UL_MASK_B), b[4:1]};
    for (int n = 0; n < 31; n++) begin
      c[n] = a[0] ^ b[0];
      a = {^(a & UL_MASK_A), a[4:1]};
      b = {^(b & UL_MASK_B), b[4:1]};
    end
    c[31] = c[0];
    return c;
  endfunction

  // First LEN (<= 64) chips of a down-link Gold sequence whose A register starts at seed.
  function automatic logic [63:0] dl_prefix(logic [17:0] seed, int len);
    logic [17:0] a, b;
    logic [63:0] c;
    a = seed;
    b = DL_SEED_B;
    c = '0;
    for (int n = 0; n < len; n++) begin
      c[n] = a[0] ^ b[0];
      a = {^(a & DL_MASK_A), a[17:1]};
      b = {^(b & DL_MASK_B), b[17:1]};
    end
    return c;
  endfunction

endpackage
