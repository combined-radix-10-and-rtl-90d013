// otf_convert: on-the-fly conversion of the signed quotient digits.
//
// Keeps two digit registers, Q (the quotient so far) and QM (= Q minus one
// unit of its last digit), both in the radix's own code: BCD digits in
// radix 10, hexadecimal digits (plain binary) in radix 16. For each new
// digit q in {-(r-1)..r-1} both registers shift left by one digit and
// append, without any carry propagation:
//   Q  <= (q >= 0) ? {Q , q}     : {QM, r+q}
//   QM <= (q >  0) ? {Q , q-1}   : {QM, r-1+q}
// `init` clears Q and sets every digit of QM to r-1 (the value -1 in r's
// complement). QM is what the rounding stage uses when the final remainder
// is negative.
//
// Timing: one digit per clock when `step` is high; `init` has priority.
// Active-low synchronous reset clears both registers.
module otf_convert #(
  parameter int unsigned QD = div_pkg::QDIG
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic                step,
  input  logic                radix10,
  input  div_pkg::qdig_t      q,
  output logic [QD-1:0][3:0]  qq,
  output logic [QD-1:0][3:0]  qm
);
  logic [4:0] r5;
  assign r5 = radix10 ? 5'd10 : 5'd16;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      qq <= '0;
      qm <= '0;
    end else if (init) begin
      qq <= '0;
      for (int i = 0; i < QD; i++) qm[i] <= div_pkg::radix_max(radix10);
    end else if (step) begin
      if (q >= 0) qq <= {qq[QD-2:0], 4'(q)};
      else        qq <= {qm[QD-2:0], 4'(r5 + 5'(q))};
      if (q > 0)  qm <= {qq[QD-2:0], 4'(q - 5'sd1)};
      else        qm <= {qm[QD-2:0], 4'(r5 - 5'd1 + 5'(q))};
    end
  end
endmodule
