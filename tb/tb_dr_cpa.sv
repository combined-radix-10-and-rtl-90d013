// tb_dr_cpa: checks the final-remainder adder. The assimilated digits must
// equal val(s) + val(c) mod r^W, `neg` must flag values >= r^W / 2 (negative
// in r's complement) and `zero` an exactly zero sum. Zero and negative
// residuals in carry-save form are built on purpose.
module tb_dr_cpa;
  import tb_util_pkg::*;
  localparam int W = 20;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10, neg, zero;
  logic [W-1:0][3:0] s, sum;
  logic [W-1:0] c;
  int checks = 0, failures = 0, nneg = 0, nzero = 0;

  dr_cpa #(.W(W)) dut (.radix10, .s, .c, .sum, .neg, .zero);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128_t m, v, target;
    for (int i = 0; i < 4000; i++) begin
      radix10 = i[0];
      m = rpow(radix10, W);
      c = {$urandom, $urandom};
      // Pick the target value: small positive, small negative, zero or random.
      unique case (i % 4)
        0: target = u128_t'($urandom);
        1: target = m - u128_t'($urandom_range(1000000, 1));
        2: target = 0;
        default: target = dval(radix10, rnd_dvec(radix10, W), W);
      endcase
      s = to_dvec(radix10, (target + m - cval(radix10, c, W) % m) % m, W);
      @(posedge clk);
      v = dval(radix10, sum, W);
      checks++;
      if (v != target || neg != (target >= m / 2) || zero != (target == 0)
          || !valid_digits(radix10, sum, W)) begin
        failures++;
        if (failures < 5) $display("mismatch r10=%0b v=%h target=%h", radix10, v, target);
      end
      if (neg) nneg++;
      if (zero) nzero++;
    end
    checks++;
    if (nneg == 0 || nzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
