// tb_ms_slice: checks the radix-2 MS slice.
// Random values of r*w (in units of r^-3, over the whole range the
// recurrence allows, |r*w| <= r*rho*d) are written in digit carry-save form
// with random carry bits. The slice must return the value exactly as its
// two's complement estimate, and the digits it selects must keep the
// recurrence bounded: with d equal to its 3-digit prefix,
//   |r*w - (k*qH + qL) * d| <= rho * d,
// with qH in {-1,0,1} for radix 10. The selection constants come from
// sel_constants. Directed cases check the thresholds at d = 0.100.
module tb_ms_slice;
  import div_pkg::*;
  import tb_util_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10;
  logic [MS_DIG-1:0][3:0] rs_top;
  logic [MS_DIG-1:0] rc_top;
  logic [11:0] d_lead;
  ms_t mh2, mh1, ml2, ml1, rw_est;
  qpart_t qh, ql;
  logic [4:0] row;
  int checks = 0, failures = 0, nqh2 = 0, nql2 = 0;

  sel_constants u_c (.radix10, .d_lead, .mh2, .mh1, .ml2, .ml1, .row);
  ms_slice dut (.radix10, .rs_top, .rc_top, .d_lead, .mh2, .mh1, .ml2, .ml1,
                .qh, .ql, .rw_est);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic r10, input int dl, input longint v);
    u128_t m, u;
    longint dv, w, lim;
    radix10 = r10;
    d_lead = r10 ? 12'(((dl / 100) << 8) | (((dl / 10) % 10) << 4) | (dl % 10)) : 12'(dl);
    m = rpow(r10, MS_DIG);
    rc_top = MS_DIG'($urandom);
    u = (v < 0) ? m - u128_t'(-v) : u128_t'(v);
    u = (u + m - cval(r10, 20'(rc_top), MS_DIG) % m) % m;
    rs_top = (MS_DIG * 4)'(to_dvec(r10, u, MS_DIG));
    @(posedge clk);
    dv = dl;
    w  = v - (longint'(r10 ? 5 : 4) * longint'(qh) + longint'(ql)) * dv;
    checks++;
    if (longint'(rw_est) != v) begin
      failures++;
      if (failures < 10) $display("est r10=%0b v=%0d est=%0d", r10, v, rw_est);
    end
    checks++;
    lim = r10 ? 7 * dv : 2 * dv;
    if ((r10 ? 9 : 3) * (w < 0 ? -w : w) > lim || (r10 && (qh == 3'sd2 || qh == -3'sd2))) begin
      failures++;
      if (failures < 10) $display("sel r10=%0b d=%0d v=%0d qh=%0d ql=%0d", r10, dl, v, qh, ql);
    end
    if (qh == 3'sd2 || qh == -3'sd2) nqh2++;
    if (ql == 3'sd2 || ql == -3'sd2) nql2++;
  endtask

  initial begin
    int dl;
    longint vmax;
    // Thresholds at d = 0.100 (radix 10): m_H1 = 0.26, m_L2 = 0.16.
    apply(1'b1, 100, 260);
    checks++; if (qh != 3'sd1)  failures++;
    apply(1'b1, 100, 259);
    checks++; if (qh != 3'sd0)  failures++;
    apply(1'b1, 100, 160);
    checks++; if (ql != 3'sd2)  failures++;
    apply(1'b1, 100, -261);
    checks++; if (qh != -3'sd1) failures++;
    for (int i = 0; i < 20000; i++) begin
      if (i[0]) begin
        dl = $urandom_range(999, 100);
        vmax = (70 * longint'(dl)) / 9;
        apply(1'b1, dl, longint'($urandom_range(2 * 32'(vmax), 0)) - vmax);
      end else begin
        dl = $urandom_range(4095, 2048);
        vmax = (32 * longint'(dl)) / 3;
        apply(1'b0, dl, longint'($urandom_range(2 * 32'(vmax), 0)) - vmax);
      end
    end
    checks++;
    if (nqh2 == 0 || nql2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
