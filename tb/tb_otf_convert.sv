// tb_otf_convert: checks the on-the-fly converter. After init and each step
// with a random signed digit (-7..7 in radix 10, -10..10 in radix 16), the
// registers must hold Q = sum q_j r^(n-j) and Q - 1, modulo r^QD, in valid
// BCD / hexadecimal digits. Digit sequences that start negative (so that
// Q passes through negative values) are included.
module tb_otf_convert;
  import tb_util_pkg::*;
  localparam int QD = 19;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, step = 1'b0, radix10 = 1'b1;
  div_pkg::qdig_t q = '0;
  logic [QD-1:0][3:0] qq, qm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  otf_convert #(.QD(QD)) dut (.clk, .rst_n, .init, .step, .radix10, .q, .qq, .qm);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128_t m, qv;
    int qi, qmaxd;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      radix10 = n[0];
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      m  = rpow(radix10, QD);
      qv = 0;
      qmaxd = radix10 ? 7 : 10;
      for (int j = 0; j < QD; j++) begin
        qi = $urandom_range(2 * qmaxd, 0) - qmaxd;
        if (n % 3 == 0 && j == 0) qi = -1;
        q = 5'(qi);
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        if (qi >= 0) qv = (qv * (radix10 ? 10 : 16) + u128_t'(qi)) % m;
        else         qv = (qv * (radix10 ? 10 : 16) + m - u128_t'(-qi)) % m;
        checks++;
        if (dval(radix10, 80'(qq), QD) != qv || dval(radix10, 80'(qm), QD) != (qv + m - 1) % m
            || !valid_digits(radix10, 80'(qq), QD) || !valid_digits(radix10, 80'(qm), QD)) begin
          failures++;
          if (failures < 5) $display("mismatch r10=%0b step=%0d qq=%h exp=%h", radix10, j,
                                     dval(radix10, 80'(qq), QD), qv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
