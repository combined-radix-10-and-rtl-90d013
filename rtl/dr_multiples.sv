// dr_multiples: precomputation of the divisor multiples.
//
// From the divisor d (NDIG digits, most significant first in the 4*NDIG-bit
// field, value 0.d1 d2 ... ) it forms, aligned in the residual frame of
// W digits (2 integer digits, NDIG+2 fraction digits):
//   radix 10: d_1x = d, d_2x = 2d, k_1x = 5d, k_2x = 0 (not used)
//   radix 16: d_1x = d, d_2x = 2d, k_1x = 4d, k_2x = 8d
// The radix-10 multiples are formed digit by digit in BCD (digit*c + carry,
// base 10); the radix-16 ones by the same digit loop in base 16, which is a
// plain shift. The multiples are computed once per division and held in
// registers by the caller.
//
// Purely combinational.
module dr_multiples #(
  parameter int unsigned NDIG = div_pkg::NDIG,
  parameter int unsigned W    = NDIG + 4
) (
  input  logic                radix10,
  input  logic [4*NDIG-1:0]   d,
  output logic [W-1:0][3:0]   d_1x,
  output logic [W-1:0][3:0]   d_2x,
  output logic [W-1:0][3:0]   k_1x,
  output logic [W-1:0][3:0]   k_2x
);
  // Small-constant multiple of the divisor, digit serial from the LSD.
  // Digit j of d (j = 0 is the MSD, weight r^-1) lands at frame index
  // W-3-j; index W-2 is weight r^0 and receives the final carry.
  function automatic logic [W-1:0][3:0] mul_small(input logic [4*NDIG-1:0] dv,
                                                  input logic [3:0] c,
                                                  input logic r10);
    // t = digit * c + carry <= 15*8 + 7, so 7 bits are enough.
    logic [W-1:0][3:0] res;
    logic [6:0] t, carry;
    res   = '0;
    carry = '0;
    for (int j = NDIG - 1; j >= 0; j--) begin
      t = 7'(dv[4*(NDIG-1-j) +: 4]) * {3'b0, c} + carry;
      if (r10) begin
        res[W-3-j] = 4'(t % 7'd10);
        carry      = t / 7'd10;
      end else begin
        res[W-3-j] = t[3:0];
        carry      = {4'b0, t[6:4]};
      end
    end
    res[W-2] = carry[3:0];
    return res;
  endfunction

  always_comb begin
    d_1x = mul_small(d, 4'd1, radix10);
    d_2x = mul_small(d, 4'd2, radix10);
    k_1x = mul_small(d, radix10 ? 4'd5 : 4'd4, radix10);
    k_2x = radix10 ? '0 : mul_small(d, 4'd8, 1'b0);
  end
endmodule
