// ms_slice: radix-2 most-significant slice with both selection functions.
//
// Works on the top MS_DIG digits of r*w[j-1] (2 integer and 3 fraction
// digits, taken from the carry-save residual together with their carry
// bits) and converts them to a two's complement integer in units of r^-3:
// each BCD or hexadecimal digit is weighted by its power of r (for radix 16
// this is just bit concatenation), and the sum is reduced modulo r^MS_DIG and
// read as a signed value. Dropping the lower digits gives an estimate that is
// below the true value by less than r/(r-1) units.
//
// q_H selection: four sign detectors compare the estimate with m_H2, m_H1,
// m_H0 = -m_H1 and m_H-1 = -m_H2 and an encoder gives q_H in {-2..2}
// (radix 10: only the m_H1 / m_H0 detectors are used, q_H in {-1,0,1}).
//
// q_L selection: five blocks compute speculatively, for each possible q_H,
// the estimate v = rW - q_H*(k*D), with D the divisor truncated to 3
// fraction digits, and compare it with m_L2, m_L1, -m_L1, -m_L2. A 5:1
// multiplexer controlled by q_H picks the q_L in {-2..2}.
//
// Purely combinational. The selection scheme follows the document; forming
// the binary slice by converting the top residual digits every cycle (rather
// than keeping a separate binary register slice) is this design's choice.
module ms_slice
  import div_pkg::*;
(
  input  logic                    radix10,
  input  logic [MS_DIG-1:0][3:0]  rs_top,   // top digits of r*w, sum part
  input  logic [MS_DIG-1:0]       rc_top,   // their carry bits
  input  logic [11:0]             d_lead,   // d1 d2 d3
  input  ms_t                     mh2,
  input  ms_t                     mh1,
  input  ms_t                     ml2,
  input  ms_t                     ml1,
  output qpart_t                  qh,
  output qpart_t                  ql,
  output ms_t                     rw_est
);
  ms_t raw, modv, dhat, kd, v_spec;
  qpart_t ql_spec [5];
  int unsigned rpow;

  // Sign-detector based encoder for one thresholds set.
  function automatic qpart_t encode(input ms_t val, input ms_t t2, input ms_t t1,
                                    input logic five);
    logic ge2, ge1, ge0, gem1;
    ge2  = (val - t2) >= 0;
    ge1  = (val - t1) >= 0;
    ge0  = (val + t1) >= 0;
    gem1 = (val + t2) >= 0;
    if (five && ge2)  return 3'sd2;
    if (ge1)          return 3'sd1;
    if (ge0)          return 3'sd0;
    if (!five || gem1) return -3'sd1;
    return -3'sd2;
  endfunction

  always_comb begin
    // Conversion of the top digits to binary.
    raw  = '0;
    rpow = 1;
    for (int i = 0; i < MS_DIG; i++) begin
      raw  = raw + ms_t'((int'(rs_top[i]) + int'(rc_top[i])) * rpow);
      rpow = rpow * (radix10 ? 10 : 16);
    end
    // rpow = r^MS_DIG: reduce and read as signed.
    modv = raw;
    if (modv >= ms_t'(rpow)) modv = modv - ms_t'(rpow);
    if (modv >= ms_t'(rpow / 2)) modv = modv - ms_t'(rpow);
    rw_est = modv;

    // Truncated divisor and k*D.
    dhat = radix10 ? ms_t'(int'(d_lead[11:8]) * 100 + int'(d_lead[7:4]) * 10 + int'(d_lead[3:0]))
                   : ms_t'(d_lead);
    kd   = radix10 ? ms_t'(dhat * 5) : ms_t'(dhat * 4);

    // q_H: four sign detectors.
    qh = encode(rw_est, mh2, mh1, !radix10);

    // q_L: five speculative blocks, then the 5:1 multiplexer.
    for (int q = -2; q <= 2; q++) begin
      v_spec = rw_est - ms_t'(q) * kd;
      ql_spec[q+2] = encode(v_spec, ml2, ml1, 1'b1);
    end
    ql = ql_spec[int'(qh) + 2];
  end
endmodule
