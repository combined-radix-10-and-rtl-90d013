// tb_round_norm: checks correction, normalization and rounding against
// integer arithmetic. A random truncated quotient Qf covering the whole
// range (0.1..10 in radix 10, 0.5..2 in radix 16) is presented either as Q
// with a non-negative remainder or as QM = Qf with Q = Qf + 1 and a negative
// remainder. The expected significand is Qf cut to 16 digits / 53 bits
// after the normalization shift, rounded to nearest with ties to even using
// the dropped digits and the remainder's zero flag; carry-out of rounding
// must renormalize. Directed ties, all-nines and all-ones cases included.
module tb_round_norm;
  import tb_util_pkg::*;
  localparam int QD = 19;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10, rem_neg, rem_zero, inexact;
  logic [QD-1:0][3:0] qq, qm;
  logic [63:0] sig;
  logic signed [1:0] exp_adj;
  int checks = 0, failures = 0, novf = 0, nshift = 0, nup = 0;

  round_norm dut (.radix10, .qq, .qm, .rem_neg, .rem_zero, .sig, .exp_adj, .inexact);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic r10, input u128_t qf, input logic neg, input logic zero);
    u128_t sg, rr, half, top, got;
    int e;
    logic st, up, inx;
    dvec_t v1, v0;
    radix10  = r10;
    rem_neg  = neg;
    rem_zero = zero;
    v1 = to_dvec(r10, neg ? qf + 1 : qf, QD);
    v0 = to_dvec(r10, neg ? qf : qf - 1, QD);
    if (!r10) for (int i = 16; i < QD; i++) begin v1[i] = 4'($urandom); v0[i] = 4'($urandom); end
    qq = v1[QD-1:0];
    qm = v0[QD-1:0];
    @(posedge clk);
    if (r10) begin
      top = 128'd10_000_000_000_000_000;
      if (qf >= 128'd100_000_000_000_000_000) begin sg = qf / 100; rr = qf % 100; half = 50; e = 0; end
      else begin sg = qf / 10; rr = qf % 10; half = 5; e = -1; end
    end else begin
      top = 128'd1 << 53;
      if (qf >= (128'd1 << 56)) begin sg = qf >> 4; rr = qf & 15; half = 8; e = 0; end
      else begin sg = qf >> 3; rr = qf & 7; half = 4; e = -1; end
    end
    st  = !zero;
    inx = (rr != 0) || st;
    up  = (rr > half) || ((rr == half) && (st || sg[0]));
    sg  = sg + u128_t'(up);
    if (sg == top) begin sg = top / (r10 ? 10 : 2); e++; novf++; end
    if (e < 0) nshift++;
    if (up) nup++;
    got = r10 ? dval(1'b1, 80'(sig), 16) : u128_t'(sig);
    checks++;
    if (got != sg || int'(exp_adj) != e || inexact != inx) begin
      failures++;
      if (failures < 10) $display("mismatch r10=%0b qf=%h got=%h/%0d/%0b exp=%h/%0d/%0b",
                                  r10, qf, got, exp_adj, inexact, sg, e, inx);
    end
  endtask

  function automatic u128_t rnd_range(input u128_t lo, input u128_t hi);
    u128_t r = {$urandom, $urandom, $urandom, $urandom};
    return lo + r % (hi - lo);
  endfunction

  initial begin
    u128_t lo10, hi10, lo16, hi16;
    lo10 = 128'd10_000_000_000_000_000;      // 0.1 in units of 10^-17
    hi10 = 128'd1_000_000_000_000_000_000;   // 10
    lo16 = 128'd1 << 55;
    hi16 = 128'd1 << 57;
    // Directed: ties, all nines, all ones.
    apply(1'b1, 128'd123_456_789_012_345_650, 1'b0, 1'b1);  // tie, even -> down
    apply(1'b1, 128'd123_456_789_012_345_750, 1'b0, 1'b1);  // tie, odd -> up
    apply(1'b1, 128'd123_456_789_012_345_650, 1'b0, 1'b0);  // above tie
    apply(1'b1, hi10 - 1, 1'b0, 1'b0);                      // rounds to 10
    apply(1'b1, 128'd99_999_999_999_999_999, 1'b1, 1'b0);   // 0.99.. -> 1
    apply(1'b0, hi16 - 1, 1'b0, 1'b0);                      // rounds to 2
    apply(1'b0, (128'd1 << 56) - 1, 1'b0, 1'b1);            // 0.11..1 -> 1
    apply(1'b0, (128'd1 << 56) | 128'h8, 1'b0, 1'b1);       // tie, even
    apply(1'b0, (128'd1 << 56) | 128'h18, 1'b1, 1'b1);      // tie, odd
    for (int i = 0; i < 5000; i++) begin
      if (i[0]) apply(1'b1, rnd_range(lo10, hi10), $urandom_range(1, 0), (i % 7) == 0);
      else      apply(1'b0, rnd_range(lo16, hi16), $urandom_range(1, 0), (i % 7) == 0);
    end
    checks++;
    if (novf == 0 || nshift == 0 || nup == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
