// dr_divider: combined radix-10 / radix-16 digit-recurrence divider.
//
// Divides two normalized significands, x / d, in one of two modes chosen
// per operation by `radix10` (the document's bit R):
//   radix10 = 1: x, d are NDIG-digit BCD fractions in [0.1, 1); the result
//                is an NDIG-digit BCD significand.
//   radix10 = 0: x, d are binary fractions 0.1xxx... in [0.5, 1) in the same
//                4*NDIG-bit field (a 53-bit significand is left-aligned);
//                the result is a PBIN-bit binary significand.
// Both use the recurrence
//   v[j] = r*w[j-1] - qH*(k*d),   w[j] = v[j] - qL*d,   w[0] = x/r^2,
// with r = 10, k = 5, qH in {-1,0,1} or r = 16, k = 4, qH in {-2..2}, and
// qL in {-2..2}; the quotient digit is q = k*qH + qL, one per cycle.
// The residual is kept in digit carry-save form (4-bit digit + carry bit per
// digit), so both radices share the shift by one digit and the same
// dual-radix carry-save adders. qH and qL come from the radix-2 MS slice,
// which compares a two's complement estimate of r*w with constants preloaded
// from the divisor interval (qL speculatively for all five qH).
// The digits go through on-the-fly conversion; at the end the remainder's
// sign and zero flag select Q or Q-1 and drive normalization and
// round-to-nearest-even.
//
// Interface: `start` (sampled when not busy) with x, d, radix10; `done`
// pulses when q_sig / q_exp_adj / q_inexact are valid; they are held until
// the next result. Value of the result:
//   radix 10: x/d ~= q_sig (BCD) * 10^(q_exp_adj - (NDIG-1))
//   radix 16: x/d ~= q_sig * 2^(q_exp_adj - (PBIN-1))
// Timing: 20 cycles (radix 10) / 17 cycles (radix 16) from start to done.
// Active-low synchronous reset. Divisor multiples and constants are
// computed in the load cycle and registered.
module dr_divider #(
  parameter int unsigned NDIG = div_pkg::NDIG,
  parameter int unsigned PBIN = div_pkg::PBIN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  radix10,
  input  logic [4*NDIG-1:0]     x,
  input  logic [4*NDIG-1:0]     d,
  output logic                  busy,
  output logic                  done,
  output logic [4*NDIG-1:0]     q_sig,
  output logic signed [1:0]     q_exp_adj,
  output logic                  q_inexact,
  // Observation of the selected digits (for verification / debug).
  output div_pkg::qpart_t       dbg_qh,
  output div_pkg::qpart_t       dbg_ql,
  output logic                  dbg_step
);
  import div_pkg::*;

  localparam int unsigned W       = NDIG + 4;
  localparam int unsigned N_DEC = NDIG + 3;
  localparam int unsigned N_BIN = (PBIN + 2 + 3) / 4 + 2;
  localparam int unsigned QD      = (N_DEC > N_BIN) ? N_DEC : N_BIN;

  // Control.
  logic       load, step, finish;

  div_ctrl #(.NIT_DEC(N_DEC), .NIT_BIN(N_BIN)) u_ctrl (
    .clk, .rst_n, .start, .radix10,
    .load, .step, .finish, .busy, .done, .iter()
  );

  // Per-division registers: radix, multiples, divisor estimate, constants.
  logic                rr;
  logic [W-1:0][3:0]   m_d1, m_d2, m_k1, m_k2;
  logic [W-1:0][3:0]   n_d1, n_d2, n_k1, n_k2;
  logic [11:0]         d_lead_r;
  ms_t                 c_mh2, c_mh1, c_ml2, c_ml1;
  ms_t                 n_mh2, n_mh1, n_ml2, n_ml1;

  dr_multiples #(.NDIG(NDIG), .W(W)) u_mult (
    .radix10, .d, .d_1x(n_d1), .d_2x(n_d2), .k_1x(n_k1), .k_2x(n_k2)
  );

  sel_constants u_const (
    .radix10, .d_lead(d[4*NDIG-1 -: 12]),
    .mh2(n_mh2), .mh1(n_mh1), .ml2(n_ml2), .ml1(n_ml1), .row()
  );

  // Residual w in digit carry-save form.
  logic [W-1:0][3:0]   ws, rs, vs, ns;
  logic [W-1:0]        wc, rc, vc, nc;

  // r*w[j-1]: shift by one digit; the freed carry slot takes the +1 of the
  // qH subtraction.
  qpart_t            qh, ql;
  logic [W-1:0][3:0] yh, yl;
  logic              negh, negl;
  ms_t               rw_est;

  assign rs = {ws[W-2:0], 4'h0};
  assign rc = {wc[W-2:0], negh};

  ms_slice u_ms (
    .radix10(rr),
    .rs_top(rs[W-1 -: MS_DIG]), .rc_top(rc[W-1 -: MS_DIG]),
    .d_lead(d_lead_r),
    .mh2(c_mh2), .mh1(c_mh1), .ml2(c_ml2), .ml1(c_ml1),
    .qh, .ql, .rw_est
  );

  dr_mult_mux #(.W(W)) u_mux_h (
    .radix10(rr), .q(qh), .m1(m_k1), .m2(m_k2), .y(yh), .neg(negh)
  );
  dr_csa #(.W(W)) u_csa_h (
    .radix10(rr), .s(rs), .c(rc), .y(yh), .cin(negl), .so(vs), .co(vc)
  );
  dr_mult_mux #(.W(W)) u_mux_l (
    .radix10(rr), .q(ql), .m1(m_d1), .m2(m_d2), .y(yl), .neg(negl)
  );
  dr_csa #(.W(W)) u_csa_l (
    .radix10(rr), .s(vs), .c(vc), .y(yl), .cin(1'b0), .so(ns), .co(nc)
  );

  // w[0] = x / r^2: x's digits go to fraction positions 3 .. NDIG+2.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr       <= 1'b1;
      ws       <= '0;
      wc       <= '0;
      m_d1     <= '0;
      m_d2     <= '0;
      m_k1     <= '0;
      m_k2     <= '0;
      d_lead_r <= '0;
      c_mh2    <= '0;
      c_mh1    <= '0;
      c_ml2    <= '0;
      c_ml1    <= '0;
    end else if (load) begin
      rr       <= radix10;
      ws       <= '0;
      ws[NDIG-1:0] <= x;
      wc       <= '0;
      m_d1     <= n_d1;
      m_d2     <= n_d2;
      m_k1     <= n_k1;
      m_k2     <= n_k2;
      d_lead_r <= d[4*NDIG-1 -: 12];
      c_mh2    <= n_mh2;
      c_mh1    <= n_mh1;
      c_ml2    <= n_ml2;
      c_ml1    <= n_ml1;
    end else if (step) begin
      ws <= ns;
      wc <= nc;
    end
  end

  // Quotient digit q = k*qH + qL and on-the-fly conversion.
  qdig_t             qd;
  logic [QD-1:0][3:0] qq, qm;
  assign qd = rr ? qdig_t'(5 * int'(qh) + int'(ql)) : qdig_t'(4 * int'(qh) + int'(ql));

  otf_convert #(.QD(QD)) u_otf (
    .clk, .rst_n, .init(load), .step, .radix10(rr), .q(qd), .qq, .qm
  );

  // Final remainder: sign and zero.
  logic              rem_neg, rem_zero;
  dr_cpa #(.W(W)) u_cpa (
    .radix10(rr), .s(ws), .c(wc), .sum(), .neg(rem_neg), .zero(rem_zero)
  );

  logic [4*NDIG-1:0] n_sig;
  logic signed [1:0] n_exp;
  logic              n_inx;
  round_norm #(.NDIG(NDIG), .PBIN(PBIN), .NIT_DEC(N_DEC), .NIT_BIN(N_BIN), .QD(QD)) u_round (
    .radix10(rr), .qq, .qm, .rem_neg, .rem_zero,
    .sig(n_sig), .exp_adj(n_exp), .inexact(n_inx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_sig     <= '0;
      q_exp_adj <= '0;
      q_inexact <= 1'b0;
    end else if (finish) begin
      q_sig     <= n_sig;
      q_exp_adj <= n_exp;
      q_inexact <= n_inx;
    end
  end

  assign dbg_qh   = qh;
  assign dbg_ql   = ql;
  assign dbg_step = step;

  // Radix-10 operands must be valid BCD with a non-zero leading digit;
  // radix-16 operands must be normalized (leading bit set).
  function automatic logic valid_operand(input logic r10, input logic [4*NDIG-1:0] v);
    if (!r10) return v[4*NDIG-1];
    if (v[4*NDIG-1 -: 4] == 4'd0) return 1'b0;
    for (int i = 0; i < int'(NDIG); i++) if (v[4*i +: 4] > 4'd9) return 1'b0;
    return 1'b1;
  endfunction
  a_operands: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> valid_operand(radix10, x) && valid_operand(radix10, d));

  // The residual must stay bounded: |r*w| < r * (2/3 or 7/9) < r.
  a_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> (rw_est < ms_t'(rr ? 10000 : 65536)) && (rw_est > -ms_t'(rr ? 10000 : 65536)));
endmodule
