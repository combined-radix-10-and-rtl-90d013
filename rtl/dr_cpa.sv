// dr_cpa: dual-radix carry-propagate adder for the final remainder.
//
// Assimilates the carry-save residual (digit vector s plus one carry bit per
// digit c) into a single r's complement digit vector, rippling one decimal
// or hexadecimal carry from digit to digit. It reports the sign of the
// remainder (top digit >= r/2, i.e. >= 5 in BCD or >= 8 in hexadecimal) and
// whether it is exactly zero; these drive the final quotient correction
// and the sticky information for rounding.
//
// Purely combinational. A ripple structure is this design's choice.
module dr_cpa #(
  parameter int unsigned W = div_pkg::WDIG
) (
  input  logic              radix10,
  input  logic [W-1:0][3:0] s,
  input  logic [W-1:0]      c,
  output logic [W-1:0][3:0] sum,
  output logic              neg,
  output logic              zero
);
  always_comb begin
    logic [4:0] t;
    logic       cy;
    cy = 1'b0;
    for (int i = 0; i < W; i++) begin
      t = {1'b0, s[i]} + {4'b0, c[i]} + {4'b0, cy};
      if (radix10 && t >= 5'd10) begin
        sum[i] = 4'(t - 5'd10);
        cy     = 1'b1;
      end else if (!radix10 && t[4]) begin
        sum[i] = t[3:0];
        cy     = 1'b1;
      end else begin
        sum[i] = t[3:0];
        cy     = 1'b0;
      end
    end
    neg  = radix10 ? (sum[W-1] >= 4'd5) : sum[W-1][3];
    zero = (sum == '0);
  end
endmodule
