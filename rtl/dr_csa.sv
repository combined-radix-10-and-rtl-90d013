// dr_csa: dual-radix carry-save adder, one digit cell per position.
//
// Adds a digit vector y to a residual held in digit carry-save form (digit
// vector s plus one carry bit per digit c). Each cell computes
// t = s_i + c_i + y_i (at most 19 in radix 10, 31 in radix 16), keeps
// t mod r as the new sum digit and passes the bit (t >= r) to the carry
// position of the next digit; nothing propagates further, so the delay is
// that of one 4-bit cell whatever the width. The radix select `radix10`
// switches each cell between the BCD correction (subtract 10) and plain
// hexadecimal wrap, which is the multiplexing the dual-radix adder needs.
// The carry out of the top digit is dropped (arithmetic modulo r^W). The
// carry position of digit 0 of the result is free and takes `cin`, so a
// following subtraction can inject its +1 there.
//
// Purely combinational. The cell structure (4-bit add, conditional -10) is
// this design's choice; the document specifies a per-digit dual-radix adder.
module dr_csa #(
  parameter int unsigned W = div_pkg::WDIG
) (
  input  logic             radix10,
  input  logic [W-1:0][3:0] s,
  input  logic [W-1:0]      c,
  input  logic [W-1:0][3:0] y,
  input  logic              cin,
  output logic [W-1:0][3:0] so,
  output logic [W-1:0]      co
);
  always_comb begin
    logic [4:0] t;
    co[0] = cin;
    for (int i = 0; i < W; i++) begin
      t = {1'b0, s[i]} + {1'b0, y[i]} + {4'b0, c[i]};
      if (radix10) begin
        if (t >= 5'd10) begin
          so[i] = 4'(t - 5'd10);
          if (i + 1 < W) co[i+1] = 1'b1;
        end else begin
          so[i] = t[3:0];
          if (i + 1 < W) co[i+1] = 1'b0;
        end
      end else begin
        so[i] = t[3:0];
        if (i + 1 < W) co[i+1] = t[4];
      end
    end
  end
endmodule
