// div_pkg: sizes, types and the selection-constant table shared by the
// combined radix-10 / radix-16 digit-recurrence divider.
//
// Number formats used throughout:
//  * A "digit" is always 4 bits: a BCD digit (radix 10) or a hexadecimal
//    digit (radix 16). Shifting the residual by one digit is therefore a
//    4-bit shift in both radices.
//  * The residual w is kept in digit carry-save form: one 4-bit digit vector
//    S plus one carry bit per digit C, value = sum_i (S_i + C_i) * r^i, taken
//    modulo r^WDIG (r's complement). Index 0 is the least-significant digit.
//  * The residual frame has 2 integer digits and NDIG+2 fraction digits, so
//    that w[0] = x / r^2 is held exactly.
//  * The most-significant (MS) slice works in two's complement binary, in
//    units of r^-3 (MS_FRAC fraction digits of r*w).
//
// Sizes that follow the document: 16-digit decimal operands, 53-bit binary
// significand, quotient digit q = k*qH + qL with qH, qL in {-2..2},
// k = 5 (radix 10) or 4 (radix 16), and the constants of its selection table.
// This design's own choices: the residual frame, the iteration counts derived
// from the precision (19 for radix 10, 16 for radix 16) and the MS-slice
// resolution of 3 fraction digits.
package div_pkg;

  // Operand digits (decimal64-style significand: 16 BCD digits; the same
  // 64-bit field holds a binary fraction in radix-16 mode).
  localparam int unsigned NDIG = 16;
  // Binary significand precision (double precision).
  localparam int unsigned PBIN = 53;
  // Residual digits: 2 integer + NDIG+2 fraction.
  localparam int unsigned WDIG = NDIG + 4;
  // Fraction digits of r*w seen by the MS slice, and its total digit window.
  localparam int unsigned MS_FRAC = 3;
  localparam int unsigned MS_DIG  = MS_FRAC + 2;
  // Width of the signed binary MS-slice arithmetic.
  localparam int unsigned MSW = 24;

  typedef logic signed [2:0]     qpart_t;   // qH or qL, -2..2
  typedef logic signed [4:0]     qdig_t;    // q = k*qH + qL, -10..10
  typedef logic signed [MSW-1:0] ms_t;      // MS-slice two's complement value

  // Iterations: radix 10 needs 2 leading digits (w[0] = x/100), NDIG
  // significant digits and one round digit. Radix 16 needs 2 leading digits
  // plus enough hexadecimal digits for PBIN+2 bits (significand, round bit,
  // one bit of normalization slack).
  localparam int unsigned NIT_DEC = NDIG + 3;
  localparam int unsigned NIT_BIN = (PBIN + 2 + 3) / 4 + 2;
  localparam int unsigned QDIG    = (NIT_DEC > NIT_BIN) ? NIT_DEC : NIT_BIN;

  // Selection constants, Table of intervals on d (3 leading decimal digits
  // of d, in thousandths) and constants m_k x 100. Row r covers
  // [D_LO[r], D_LO[r+1]). Rows 13..20 coincide with the eight radix-16
  // intervals 0.1b2b3b4 (binary). Only m_H2, m_H1, m_L2, m_L1 are stored:
  // m_H-1 = -m_H2, m_H0 = -m_H1, m_L-1 = -m_L2, m_L0 = -m_L1.
  localparam int unsigned NROW = 21;
  typedef int unsigned row_tab_t [NROW];
  localparam row_tab_t D_LO  = '{100,106,120,130,140,150,170,200,220,250,300,
                                 350,420,500,570,630,690,750,820,880,940};
  localparam row_tab_t MH2_C = '{  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,
                                   0,  0,320,352,384,416,448,512,512,576};
  localparam row_tab_t MH1_C = '{ 26, 28, 32, 34, 36, 40, 46, 52, 58, 68, 80,
                                  96,114,132,144,158,180,188,208,224,224};
  localparam row_tab_t ML2_C = '{ 16, 16, 20, 20, 20, 24, 28, 32, 36, 40, 48,
                                  56, 68, 80, 88, 96,112,112,128,128,140};
  localparam row_tab_t ML1_C = '{  4,  4,  8,  8,  8,  8,  8,  8,  8,  8, 16,
                                  16, 24, 24, 36, 36, 36, 36, 36, 36, 36};

  // Integer encoding of a constant m (given x100) in MS-slice units r^-3:
  // radix 10: m * 1000 (exact); radix 16: m * 4096 rounded to nearest.
  function automatic ms_t scale_const(input int unsigned m100, input logic radix10);
    if (radix10) return ms_t'(m100 * 10);
    else         return ms_t'((m100 * 4096 + 50) / 100);
  endfunction

  // Digit helpers.
  function automatic logic [3:0] radix_max(input logic radix10); // r-1
    return radix10 ? 4'd9 : 4'd15;
  endfunction

endpackage
