// tb_dr_multiples: checks the divisor multiples against integer products.
// In the residual frame the divisor's last digit sits at position 2, so
// val(d_1x) = D * r^2 where D is the NDIG-digit integer of d; the others
// must be 2D, kD (k = 5 / 4) and, in radix 16, 8D, all with valid digits.
module tb_dr_multiples;
  import tb_util_pkg::*;
  localparam int NDIG = 16;
  localparam int W = NDIG + 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10;
  logic [4*NDIG-1:0] d;
  logic [W-1:0][3:0] d_1x, d_2x, k_1x, k_2x;
  int checks = 0, failures = 0;

  dr_multiples #(.NDIG(NDIG), .W(W)) dut (.radix10, .d, .d_1x, .d_2x, .k_1x, .k_2x);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128_t dv, sc;
    dvec_t dd;
    for (int i = 0; i < 3000; i++) begin
      radix10 = i[0];
      dd = rnd_dvec(radix10, NDIG);
      if (i % 20 == 1) for (int k = 0; k < NDIG; k++) dd[k] = radix10 ? 4'd9 : 4'd15;
      d  = 64'(dd[15:0]);
      @(posedge clk);
      dv = dval(radix10, dd, NDIG);
      sc = rpow(radix10, 2);
      checks++;
      if (dval(radix10, d_1x, W) != dv * sc || dval(radix10, d_2x, W) != 2 * dv * sc ||
          dval(radix10, k_1x, W) != (radix10 ? 5 : 4) * dv * sc ||
          dval(radix10, k_2x, W) != (radix10 ? 0 : 8 * dv * sc) ||
          !valid_digits(radix10, d_1x, W) || !valid_digits(radix10, d_2x, W) ||
          !valid_digits(radix10, k_1x, W)) begin
        failures++;
        if (failures < 5) $display("mismatch r10=%0b d=%h", radix10, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
