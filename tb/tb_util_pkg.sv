// tb_util_pkg: reference arithmetic for the divider testbenches.
// Digit vectors of up to 20 four-bit digits (index 0 least significant) are
// converted to and from 128-bit integers in radix 10 or 16, so that the
// testbenches can check digit-level hardware against plain integer math.
package tb_util_pkg;
  typedef logic [127:0] u128_t;
  typedef logic [19:0][3:0] dvec_t;

  function automatic u128_t rpow(input logic r10, input int n);
    u128_t p = 1;
    for (int i = 0; i < n; i++) p = p * (r10 ? 10 : 16);
    return p;
  endfunction

  // Value of the first n digits of a digit vector.
  function automatic u128_t dval(input logic r10, input dvec_t v, input int n);
    u128_t a = 0;
    for (int i = n - 1; i >= 0; i--) a = a * (r10 ? 10 : 16) + u128_t'(v[i]);
    return a;
  endfunction

  // Value of a carry vector (one bit per digit position).
  function automatic u128_t cval(input logic r10, input logic [19:0] c, input int n);
    u128_t a = 0;
    for (int i = n - 1; i >= 0; i--) a = a * (r10 ? 10 : 16) + u128_t'(c[i]);
    return a;
  endfunction

  // Digit vector of a value (n digits, higher digits zero).
  function automatic dvec_t to_dvec(input logic r10, input u128_t v, input int n);
    dvec_t d = '0;
    for (int i = 0; i < n; i++) begin
      d[i] = 4'(v % (r10 ? 10 : 16));
      v    = v / (r10 ? 10 : 16);
    end
    return d;
  endfunction

  function automatic dvec_t rnd_dvec(input logic r10, input int n);
    dvec_t d = '0;
    for (int i = 0; i < n; i++) d[i] = 4'($urandom_range(r10 ? 9 : 15, 0));
    return d;
  endfunction

  function automatic logic valid_digits(input logic r10, input dvec_t v, input int n);
    for (int i = 0; i < n; i++) if (r10 && v[i] > 4'd9) return 1'b0;
    return 1'b1;
  endfunction
endpackage
