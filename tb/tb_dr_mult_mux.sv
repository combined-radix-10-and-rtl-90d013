// tb_dr_mult_mux: checks the multiple selector. For every q in {-2..2}, in
// both radices, the addend and its carry-in must satisfy
//   val(y) + neg == -q * m   (mod r^W)
// where m is the 1x input for |q| = 1 and the 2x input for |q| = 2, and all
// digits of y must be valid.
module tb_dr_mult_mux;
  import tb_util_pkg::*;
  localparam int W = 20;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10, neg;
  div_pkg::qpart_t q;
  logic [W-1:0][3:0] m1, m2, y;
  int checks = 0, failures = 0;

  dr_mult_mux #(.W(W)) dut (.radix10, .q, .m1, .m2, .y, .neg);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128_t md, mv, got, exp_v;
    for (int i = 0; i < 3000; i++) begin
      radix10 = i[0];
      m1 = rnd_dvec(radix10, W);
      m2 = rnd_dvec(radix10, W);
      q  = 3'(i % 5 - 2);
      @(posedge clk);
      md  = rpow(radix10, W);
      mv  = (q == 3'sd1 || q == -3'sd1) ? dval(radix10, m1, W) :
            (q == 3'sd0) ? 0 : dval(radix10, m2, W);
      exp_v = (q > 3'sd0) ? (md - mv) % md : mv;
      got   = (dval(radix10, y, W) + u128_t'(neg)) % md;
      checks++;
      if (got != exp_v || !valid_digits(radix10, y, W)) begin
        failures++;
        if (failures < 5) $display("mismatch r10=%0b q=%0d got=%h exp=%h", radix10, q, got, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
