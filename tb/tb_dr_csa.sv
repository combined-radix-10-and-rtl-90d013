// tb_dr_csa: checks the dual-radix carry-save adder against integer math.
// For random residuals (digit vector + carry bits), addends and carry-in in
// both radices, the output must satisfy
//   val(so) + val(co) == val(s) + val(c) + val(y) + cin   (mod r^W)
// with every output digit a valid digit of the radix; carry bits must be
// generated exactly where the digit sum reaches r.
module tb_dr_csa;
  import tb_util_pkg::*;
  localparam int W = 20;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic radix10, cin;
  logic [W-1:0][3:0] s, y, so;
  logic [W-1:0] c, co;
  int checks = 0, failures = 0;

  dr_csa #(.W(W)) dut (.radix10, .s, .c, .y, .cin, .so, .co);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128_t m, lhs, rhs;
    for (int i = 0; i < 4000; i++) begin
      radix10 = i[0];
      s   = rnd_dvec(radix10, W);
      y   = rnd_dvec(radix10, W);
      c   = {$urandom, $urandom};
      c[0] = $urandom_range(1, 0);
      cin = $urandom_range(1, 0);
      if (i % 50 == 0) begin   // all-max operands: every position carries
        for (int k = 0; k < W; k++) begin s[k] = radix10 ? 4'd9 : 4'd15; y[k] = s[k]; end
        c = '1;
      end
      @(posedge clk);
      m   = rpow(radix10, W);
      lhs = (dval(radix10, so, W) + cval(radix10, co, W)) % m;
      rhs = (dval(radix10, s, W) + cval(radix10, c, W) + dval(radix10, y, W) + u128_t'(cin)) % m;
      checks++;
      if (lhs != rhs || !valid_digits(radix10, so, W) || co[0] != cin) begin
        failures++;
        if (failures < 5) $display("mismatch r10=%0b lhs=%h rhs=%h", radix10, lhs, rhs);
      end
      checks++;
      for (int k = 1; k < W; k++)
        if (co[k] != ((int'(s[k-1]) + int'(c[k-1]) + int'(y[k-1])) >= (radix10 ? 10 : 16))) begin
          failures++;
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
