// tb_dr_divider: end-to-end self-checking test of the dual-radix divider at
// its default sizes (16 BCD digits, 53-bit binary significand).
//
// For every division the expected rounded quotient is computed here with
// 128-bit integer arithmetic (x/d as X/D, scaled, remainder compared with
// D/2, ties to even) and compared with the significand, exponent
// adjustment and inexact flag. The start-to-done latency is checked
// (20 cycles radix 10, 17 cycles radix 16). Operand sets: directed cases,
// divisors on every boundary of the selection-constant table, random
// operands in both radices (53-bit and full 64-bit binary fractions), and
// back-to-back operations that alternate the radix. The test also counts
// how often each mechanism of the design was exercised (radix switch, q_H =
// +-2, negative final remainder and use of Q-1, normalization shift,
// round-up, exact result, q_L = +-2) and counts a failure for any that never
// occurred.
module tb_dr_divider;
  localparam int NDIG = 16;
  localparam int PBIN = 53;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, radix10 = 1'b1;
  logic [63:0] x = '0, d = '0;
  logic busy, done, q_inexact, dbg_step;
  logic [63:0] q_sig;
  logic signed [1:0] q_exp_adj;
  div_pkg::qpart_t dbg_qh, dbg_ql;

  dr_divider dut (
    .clk, .rst_n, .start, .radix10, .x, .d, .busy, .done,
    .q_sig, .q_exp_adj, .q_inexact, .dbg_qh, .dbg_ql, .dbg_step
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_r10 = 0, n_r16 = 0, n_switch = 0, n_qh2 = 0, n_ql2 = 0, n_remneg = 0;
  int n_shift = 0, n_up = 0, n_exact = 0;
  logic last_radix = 1'b1;
  longint cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dbg_step && (dbg_qh == 3'sd2 || dbg_qh == -3'sd2)) n_qh2++;
    if (dbg_step && (dbg_ql == 3'sd2 || dbg_ql == -3'sd2)) n_ql2++;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] to_bcd(input logic [127:0] v);
    logic [63:0] r = '0;
    for (int i = 0; i < 16; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [127:0] from_bcd(input logic [63:0] b);
    logic [127:0] r = '0;
    for (int i = 15; i >= 0; i--) r = r * 10 + 128'(b[4*i +: 4]);
    return r;
  endfunction

  // Expected result. Decimal: X, D are the 16-digit integers of x, d.
  // Binary: X, D are the 64-bit fields.
  task automatic expect_q(input logic r10, input logic [127:0] X, input logic [127:0] D,
                          output logic [127:0] qs, output int e, output logic inx);
    logic [127:0] num, q, rm, top;
    if (r10) begin
      top = 128'd10_000_000_000_000_000;              // 10^16
      if (X >= D) begin num = X * 128'd1_000_000_000_000_000; e = 0; end
      else        begin num = X * 128'd10_000_000_000_000_000; e = -1; end
    end else begin
      top = 128'd1 << PBIN;
      if (X >= D) begin num = X << (PBIN - 1); e = 0; end
      else        begin num = X << PBIN;       e = -1; end
    end
    q  = num / D;
    rm = num % D;
    inx = (rm != 0);
    if ((2 * rm > D) || ((2 * rm == D) && q[0])) q = q + 1;
    if (q == top) begin q = top / (r10 ? 10 : 2); e = e + 1; end
    qs = q;
  endtask

  task automatic run_div(input logic r10, input logic [63:0] xv, input logic [63:0] dv);
    logic [127:0] X, D, qs, got;
    int e, lat;
    logic inx;
    if (r10) begin X = from_bcd(xv); D = from_bcd(dv); end
    else     begin X = 128'(xv);     D = 128'(dv);     end
    expect_q(r10, X, D, qs, e, inx);
    @(negedge clk);
    radix10 = r10; x = xv; d = dv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      if (dut.finish && dut.rem_neg) n_remneg++;
      if (dut.finish && dut.u_round.up) n_up++;
      @(negedge clk);
      lat++;
    end
    got = r10 ? from_bcd(q_sig) : 128'(q_sig);
    checks++;
    if (got != qs || int'(q_exp_adj) != e || q_inexact != inx) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH r10=%0b x=%h d=%h got=%h/%0d/%0b exp=%h/%0d/%0b",
                 r10, xv, dv, got, q_exp_adj, q_inexact, qs, e, inx);
    end
    checks++;
    if (lat != (r10 ? 20 : 17)) begin
      failures++;
      if (failures < 10) $display("LATENCY r10=%0b lat=%0d", r10, lat);
    end
    if (r10) n_r10++; else n_r16++;
    if (r10 != last_radix) n_switch++;
    last_radix = r10;
    if (e < 0) n_shift++;
    if (!inx) n_exact++;
  endtask

  function automatic logic [63:0] rnd_bcd(input int lead_min);
    logic [63:0] r;
    for (int i = 0; i < 16; i++) r[4*i +: 4] = 4'($urandom_range(9, 0));
    r[63:60] = 4'($urandom_range(9, lead_min));
    return r;
  endfunction

  function automatic logic [63:0] rnd_bin53();
    logic [63:0] r = {$urandom, $urandom};
    r[63] = 1'b1;
    r[10:0] = '0;
    return r;
  endfunction

  int unsigned bounds [21] = '{100,106,120,130,140,150,170,200,220,250,300,
                               350,420,500,570,630,690,750,820,880,940};

  initial begin
    logic [63:0] xv, dv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Directed decimal cases.
    run_div(1'b1, 64'h1000_0000_0000_0000, 64'h1000_0000_0000_0000);  // 1
    run_div(1'b1, 64'h9999_9999_9999_9999, 64'h1000_0000_0000_0000);  // ~10
    run_div(1'b1, 64'h1000_0000_0000_0000, 64'h9999_9999_9999_9999);  // ~0.1
    run_div(1'b1, 64'h1000_0000_0000_0000, 64'h3000_0000_0000_0000);  // 1/3
    run_div(1'b1, 64'h2000_0000_0000_0000, 64'h3000_0000_0000_0000);  // 2/3
    run_div(1'b1, 64'h1000_0000_0000_0001, 64'h2000_0000_0000_0000);  // tie
    run_div(1'b1, 64'h1000_0000_0000_0003, 64'h2000_0000_0000_0000);  // tie
    run_div(1'b1, 64'h5000_0000_0000_0000, 64'h8000_0000_0000_0000);  // exact 0.625
    // Directed binary cases.
    run_div(1'b0, 64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    run_div(1'b0, 64'hFFFF_FFFF_FFFF_F800, 64'h8000_0000_0000_0000);
    run_div(1'b0, 64'h8000_0000_0000_0000, 64'hFFFF_FFFF_FFFF_F800);
    run_div(1'b0, 64'hAAAA_AAAA_AAAA_A800, 64'hC000_0000_0000_0000);
    run_div(1'b0, 64'h8000_0000_0000_0800, 64'h8000_0000_0000_0000);
    run_div(1'b0, 64'hC000_0000_0000_0000, 64'h8000_0000_0000_0000);

    // Divisors at and just below each decimal table boundary.
    for (int b = 0; b < 21; b++) begin
      for (int k = 0; k < 20; k++) begin
        dv = rnd_bcd(1);
        dv[63:52] = 12'(((bounds[b] / 100) << 8) | (((bounds[b] / 10) % 10) << 4) | (bounds[b] % 10));
        if (k[0]) dv[51:0] = '0;
        run_div(1'b1, rnd_bcd(1), dv);
        if (b > 0) begin
          dv = to_bcd(from_bcd({dv[63:52], 52'h0}) - 1);
          if (k[1]) dv[51:0] = 52'h9999_9999_9999_9;
          run_div(1'b1, rnd_bcd(1), dv);
        end
      end
    end
    // Binary divisors at each of the eight intervals, edges included.
    for (int b = 0; b < 8; b++) begin
      for (int k = 0; k < 40; k++) begin
        dv = rnd_bin53();
        dv[62:60] = 3'(b);
        if (k % 3 == 0) dv[59:11] = '0;
        if (k % 3 == 1) dv[59:11] = '1;
        run_div(1'b0, rnd_bin53(), dv);
      end
    end

    // Random operands, alternating radix.
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(1, 0) == 1) run_div(1'b1, rnd_bcd(1), rnd_bcd(1));
      else if (i % 4 == 0) begin
        xv = {$urandom, $urandom}; xv[63] = 1'b1;
        dv = {$urandom, $urandom}; dv[63] = 1'b1;
        run_div(1'b0, xv, dv);
      end else run_div(1'b0, rnd_bin53(), rnd_bin53());
    end

    $display("mechanisms: r10=%0d r16=%0d switch=%0d qh2=%0d ql2=%0d remneg=%0d shift=%0d roundup=%0d exact=%0d",
             n_r10, n_r16, n_switch, n_qh2, n_ql2, n_remneg, n_shift, n_up, n_exact);
    checks++; if (n_r10 == 0)    failures++;
    checks++; if (n_r16 == 0)    failures++;
    checks++; if (n_switch == 0) failures++;
    checks++; if (n_qh2 == 0)    failures++;
    checks++; if (n_ql2 == 0)    failures++;
    checks++; if (n_remneg == 0) failures++;
    checks++; if (n_shift == 0)  failures++;
    checks++; if (n_up == 0)     failures++;
    checks++; if (n_exact == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
