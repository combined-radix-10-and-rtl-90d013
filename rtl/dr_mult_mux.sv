// dr_mult_mux: multiple selection for one part of the quotient digit.
//
// Produces the addend -q*m for q in {-2..2}, where m1 is the 1x multiple
// and m2 the 2x multiple of the selected base (for q_H: k*d, i.e. 5d in
// radix 10 or 4d in radix 16, and 8d; for q_L: d and 2d). Following the
// document's operation table, a positive q selects the complement of the
// multiple and a negative q the multiple itself. The complement is the
// digit-wise (r-1)-complement (9-y or 15-y); the +1 that completes the
// r's complement is returned as `neg` and is injected by the adder into a
// free carry position. q = 0 gives zero. In radix 10 q_H is limited to
// {-1,0,1}; the 2x input is then unused.
//
// Purely combinational.
module dr_mult_mux #(
  parameter int unsigned W = div_pkg::WDIG
) (
  input  logic              radix10,
  input  div_pkg::qpart_t   q,
  input  logic [W-1:0][3:0] m1,
  input  logic [W-1:0][3:0] m2,
  output logic [W-1:0][3:0] y,
  output logic              neg
);
  logic [W-1:0][3:0] sel;
  logic [3:0]        dmax;

  always_comb begin
    dmax = div_pkg::radix_max(radix10);
    unique case (q)
      3'sd1, -3'sd1: sel = m1;
      3'sd2, -3'sd2: sel = m2;
      default:       sel = '0;
    endcase
    neg = (q > 3'sd0);
    for (int i = 0; i < W; i++)
      y[i] = neg ? 4'(dmax - sel[i]) : sel[i];
  end
endmodule
