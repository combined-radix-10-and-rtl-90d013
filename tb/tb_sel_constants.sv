// tb_sel_constants: checks the selection constants two ways.
// 1. Spot values of the constant table (m_k x 100 scaled to units of r^-3).
// 2. For every 3-digit decimal divisor prefix 0.100 .. 0.999 (radix 10) and
//    every radix-16 interval 0.1b2b3b4, the constants must keep the digit
//    recurrence convergent: each threshold lies between the lower bound of
//    the digit above and the upper bound of the digit below, for the whole
//    divisor interval, with room for the estimate error of the MS slice
//    (truncated carry-save r*w: below by < r/(r-1) units; truncated divisor:
//    < 1 unit times k*|q_H|). Bounds use rho = 7/9 (radix 10) and 2/3
//    (radix 16), all in exact integer arithmetic.
module tb_sel_constants;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10;
  logic [11:0] d_lead;
  div_pkg::ms_t mh2, mh1, ml2, ml1;
  logic [4:0] row;
  int checks = 0, failures = 0;

  sel_constants dut (.radix10, .d_lead, .mh2, .mh1, .ml2, .ml1, .row);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s r10=%0b d_lead=%h mh2=%0d mh1=%0d ml2=%0d ml1=%0d",
                                  what, radix10, d_lead, mh2, mh1, ml2, ml1);
    end
  endtask

  initial begin
    longint H2, H1, L2, L1, dl, dh;
    // Spot values.
    radix10 = 1'b1; d_lead = 12'h100; @(posedge clk);
    chk(mh1 == 260 && ml2 == 160 && ml1 == 40 && mh2 == 0, "spot 0.100");
    d_lead = 12'h345; @(posedge clk);
    chk(mh1 == 800 && ml2 == 480 && ml1 == 160, "spot 0.345");
    d_lead = 12'h999; @(posedge clk);
    chk(mh1 == 2240 && ml2 == 1400 && ml1 == 360, "spot 0.999");
    radix10 = 1'b0; d_lead = 12'h800; @(posedge clk);
    chk(mh2 == 13107 && mh1 == 5407 && ml2 == 3277 && ml1 == 983, "spot hex 0.5");
    d_lead = 12'hF00; @(posedge clk);
    chk(mh2 == 23593 && mh1 == 9175 && ml2 == 5734 && ml1 == 1475, "spot hex 0.94");

    // Radix 10: units of 1/1000; e = 10/9; divisor truncation error <= 5.
    radix10 = 1'b1;
    for (int dd = 100; dd < 1000; dd++) begin
      d_lead = 12'(((dd / 100) << 8) | (((dd / 10) % 10) << 4) | (dd % 10));
      @(posedge clk);
      H1 = mh1; L2 = ml2; L1 = ml1;
      dl = dd; dh = dd + 1;
      // q_H 1 vs 0: 20/9 dh <= m_H1 ; m_H1 - 1 + 10/9 <= 25/9 dl
      chk(9 * H1 >= 20 * dh && 9 * (H1 - 1) + 10 <= 25 * dl, "r10 mH1");
      // q_L 2 vs 1: 11/9 dh <= m - 5 ; m - 1 + 10/9 + 5 <= 16/9 dl
      chk(9 * (L2 - 5) >= 11 * dh && 9 * (L2 + 4) + 10 <= 16 * dl, "r10 mL2");
      // q_L 1 vs 0: 2/9 dh <= m - 5 ; m + 4 + 10/9 <= 7/9 dl
      chk(9 * (L1 - 5) >= 2 * dh && 9 * (L1 + 4) + 10 <= 7 * dl, "r10 mL1");
    end
    // Radix 16: units of 1/4096; e = 16/15; divisor truncation error <= 8.
    radix10 = 1'b0;
    for (int b = 0; b < 8; b++) begin
      d_lead = 12'((8 + b) << 8);
      @(posedge clk);
      H2 = mh2; H1 = mh1; L2 = ml2; L1 = ml1;
      dl = (8 + b) * 256; dh = (9 + b) * 256;
      chk(3 * H2 >= 16 * dh && 15 * (H2 - 1) + 16 <= 100 * dl, "r16 mH2");
      chk(3 * H1 >= 4 * dh && 15 * (H1 - 1) + 16 <= 40 * dl, "r16 mH1");
      chk(3 * (L2 - 8) >= 4 * dh && 15 * (L2 + 7) + 16 <= 25 * dl, "r16 mL2");
      chk(3 * (L1 - 8) >= dh && 15 * (L1 + 7) + 16 <= 10 * dl, "r16 mL1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
