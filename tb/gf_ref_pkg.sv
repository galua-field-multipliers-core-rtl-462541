// gf_ref_pkg: reference model used by the multiplier testbenches.
//
// ref_mul computes r(x) = a(x) * b(x) mod (x^m + p(x)) over the integers
// modulo d, digit by digit, by schoolbook multiplication followed by
// long division from the top degree down (x^t is replaced by
// -x^(t-m) * p(x)). It shares no code with the RTL. pack/unpack convert
// between digit arrays and the flat buses of the RTL (digit i at bits
// [i*k +: k]). Elements of up to 64 digits and buses of up to 512 bits
// are supported; unused digits are kept at zero, so arrays compare with ==.
package gf_ref_pkg;

  localparam int MAXD = 64;                 // digits per element, max
  typedef int unsigned digits_t [MAXD];

  function automatic digits_t ref_mul(int unsigned d, int unsigned m,
                                      digits_t a, digits_t b, digits_t p);
    int unsigned c [2*MAXD];
    int unsigned lead;
    int          lo;
    digits_t     r;
    for (int k = 0; k < 2*MAXD; k++) c[k] = 0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < m; j++)
        c[i+j] = (c[i+j] + a[i] * b[j]) % d;
    for (int t = int'(2*m) - 2; t >= int'(m); t--) begin
      lead = c[t];
      c[t] = 0;
      lo   = t - int'(m);
      for (int i = 0; i < int'(m); i++)
        c[lo+i] = (c[lo+i] + (d - lead) * p[i]) % d;
    end
    for (int i = 0; i < MAXD; i++) r[i] = (i < int'(m)) ? c[i] : 0;
    return r;
  endfunction

  function automatic digits_t rand_digits(int unsigned d, int unsigned m);
    digits_t v;
    for (int i = 0; i < MAXD; i++) v[i] = (i < int'(m)) ? $urandom % d : 0;
    return v;
  endfunction

  function automatic digits_t fill_digits(int unsigned val, int unsigned m);
    digits_t v;
    for (int i = 0; i < MAXD; i++) v[i] = (i < int'(m)) ? val : 0;
    return v;
  endfunction

  function automatic logic [511:0] pack(digits_t v, int unsigned k, int unsigned m);
    logic [511:0] bus = '0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < k; j++)
        bus[i*k + j] = v[i][j];
    return bus;
  endfunction

  function automatic digits_t unpack(logic [511:0] bus, int unsigned k, int unsigned m);
    digits_t v;
    for (int unsigned i = 0; i < MAXD; i++) begin
      v[i] = 0;
      if (i < m)
        for (int unsigned j = 0; j < k; j++) v[i][j] = bus[i*k + j];
    end
    return v;
  endfunction

endpackage
