// sel_constants: combined generation of the selection constants.
//
// One module serves both radices. The divisor interval is found from the
// leading digits of d: in radix 10 from its first three BCD digits (d in
// [0.1, 1), 21 intervals with boundaries such as 0.100, 0.106, 0.120 ...);
// in radix 16 from the three bits b2 b3 b4 of d = 0.1 b2 b3 b4 ..., whose
// eight intervals are the last eight rows of the same table (their bounds
// rounded to the closest decimal). Each row holds one set of values m_k
// that satisfies the radix-10 and radix-16 bounds at the same time; the
// integer constant fed to the comparators is m_k scaled to the MS-slice
// unit r^-3 (exact in radix 10, rounded in radix 16), so the two radices
// share the table but have different encodings.
// Outputs are the positive constants; the others follow by symmetry:
// m_H-1 = -m_H2, m_H0 = -m_H1, m_L-1 = -m_L2, m_L0 = -m_L1.
// m_H2 exists only in radix 16 (q_H = +-2); it is zero in radix 10.
//
// Purely combinational; the divider evaluates it once per division
// ("preloading" the constants) and registers the result.
// The table values are the document's; the scaling by r^3 rather than r^2
// is this design's choice (one extra digit of estimate precision).
module sel_constants (
  input  logic         radix10,
  input  logic [11:0]  d_lead,     // d1 d2 d3 (BCD) or first 3 hex digits
  output div_pkg::ms_t mh2,
  output div_pkg::ms_t mh1,
  output div_pkg::ms_t ml2,
  output div_pkg::ms_t ml1,
  output logic [4:0]   row
);
  import div_pkg::*;

  int unsigned dd;

  always_comb begin
    dd  = int'(d_lead[11:8]) * 100 + int'(d_lead[7:4]) * 10 + int'(d_lead[3:0]);
    row = '0;
    if (radix10) begin
      for (int r = 1; r < NROW; r++)
        if (dd >= D_LO[r]) row = 5'(r);
    end else begin
      row = 5'(13 + int'(d_lead[10:8]));
    end
    mh2 = radix10 ? '0 : scale_const(MH2_C[row], 1'b0);
    mh1 = scale_const(MH1_C[row], radix10);
    ml2 = scale_const(ML2_C[row], radix10);
    ml1 = scale_const(ML1_C[row], radix10);
  end
endmodule
