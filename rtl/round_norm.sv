// round_norm: final correction, normalization and rounding.
//
// Inputs are the two on-the-fly conversion registers Q and QM and the sign
// and zero flags of the final remainder. A negative remainder means the
// digit recurrence overshot by one unit in the last place, so QM is taken
// instead of Q; a non-zero remainder makes the result inexact.
//
// Radix 10 (BCD): the quotient x/d lies in (0.1, 10). If its units digit is
// zero the result is shifted one BCD digit (4 bits) and exp_adj = -1.
// The NDIG-digit significand is rounded to nearest, ties to even, from the
// round digit and a sticky bit (lower digits, remainder).
// Radix 16 (binary): the quotient lies in (0.5, 2); normalization is a
// one-bit shift (exp_adj = -1 when the 2^0 bit is zero). The PBIN-bit
// significand is rounded to nearest even from the round bit and sticky.
// If rounding carries out of the significand (9.99..9 -> 10.00..0), the
// result is renormalized and exp_adj is incremented.
//
// Result: radix 10: x/d ~= sig * 10^(exp_adj - (NDIG-1)), sig in BCD;
//         radix 16: x/d ~= sig * 2^(exp_adj - (PBIN-1)), sig right-aligned.
//
// Purely combinational. The document names the normalization shifts; the
// round-to-nearest-even mode and this interface are this design's choice.
module round_norm #(
  parameter int unsigned NDIG    = div_pkg::NDIG,
  parameter int unsigned PBIN    = div_pkg::PBIN,
  parameter int unsigned NIT_DEC = NDIG + 3,
  parameter int unsigned NIT_BIN = (PBIN + 2 + 3) / 4 + 2,
  parameter int unsigned QD      = (NIT_DEC > NIT_BIN) ? NIT_DEC : NIT_BIN
) (
  input  logic                radix10,
  input  logic [QD-1:0][3:0]  qq,
  input  logic [QD-1:0][3:0]  qm,
  input  logic                rem_neg,
  input  logic                rem_zero,
  output logic [4*NDIG-1:0]   sig,
  output logic signed [1:0]   exp_adj,
  output logic                inexact
);
  localparam int unsigned B0 = 4 * (NIT_BIN - 2);   // bit of weight 2^0

  logic [QD-1:0][3:0]     qf;
  logic [4*NIT_BIN-1:0]   qb;
  logic [NDIG-1:0][3:0]   sd;
  logic [PBIN-1:0]        sb;
  logic [3:0]             rd;
  logic                   rb, st, lead, up, ovf;
  logic [PBIN:0]          sb_inc;

  always_comb begin
    qf      = rem_neg ? qm : qq;
    qb      = qf[NIT_BIN-1:0];
    sig     = '0;
    exp_adj = 2'sd0;
    st      = !rem_zero;
    sd      = '0;
    sb      = '0;
    rd      = '0;
    rb      = 1'b0;
    up      = 1'b0;
    ovf     = 1'b0;
    sb_inc  = '0;
    if (radix10) begin
      lead = (qf[NIT_DEC-2] != 4'd0);
      if (lead) begin
        for (int i = 0; i < int'(NDIG); i++) sd[i] = qf[NIT_DEC-1-NDIG+i];
        rd = qf[NIT_DEC-2-NDIG];
        for (int i = 0; i < int'(NIT_DEC) - 2 - int'(NDIG); i++) st = st | (qf[i] != 4'd0);
      end else begin
        for (int i = 0; i < int'(NDIG); i++) sd[i] = qf[NIT_DEC-2-NDIG+i];
        rd = qf[NIT_DEC-3-NDIG];
        for (int i = 0; i < int'(NIT_DEC) - 3 - int'(NDIG); i++) st = st | (qf[i] != 4'd0);
        exp_adj = -2'sd1;
      end
      inexact = st || (rd != 4'd0);
      up  = (rd > 4'd5) || ((rd == 4'd5) && (st || sd[0][0]));
      ovf = up;
      for (int i = 0; i < int'(NDIG); i++) begin
        if (ovf) begin
          if (sd[i] == 4'd9) sd[i] = 4'd0;
          else begin
            sd[i] = sd[i] + 4'd1;
            ovf   = 1'b0;
          end
        end
      end
      if (ovf) begin
        sd[NDIG-1] = 4'd1;
        exp_adj    = exp_adj + 2'sd1;
      end
      sig = sd;
    end else begin
      lead = qb[B0];
      if (lead) begin
        sb = qb[B0 -: PBIN];
        rb = qb[B0 - PBIN];
        for (int i = 0; i < int'(B0 - PBIN); i++) st = st | qb[i];
      end else begin
        sb = qb[B0 - 1 -: PBIN];
        rb = qb[B0 - 1 - PBIN];
        for (int i = 0; i < int'(B0 - 1 - PBIN); i++) st = st | qb[i];
        exp_adj = -2'sd1;
      end
      inexact = st || rb;
      up     = rb && (st || sb[0]);
      sb_inc = {1'b0, sb} + {{PBIN{1'b0}}, up};
      if (sb_inc[PBIN]) begin
        sb      = {1'b1, {(PBIN-1){1'b0}}};
        exp_adj = exp_adj + 2'sd1;
      end else begin
        sb = sb_inc[PBIN-1:0];
      end
      sig = {{(4*NDIG-PBIN){1'b0}}, sb};
    end
  end
endmodule
