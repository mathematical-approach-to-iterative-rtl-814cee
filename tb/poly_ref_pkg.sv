// poly_ref_pkg: reference arithmetic on polynomials with 16-bit coefficients
// modulo 2**16, for the testbenches. A polynomial is a dynamic array with
// element i the coefficient of t^i. Product by schoolbook convolution,
// quotient and remainder by textbook long division.
package poly_ref_pkg;
  typedef logic [15:0] word_t;
  typedef word_t poly_t[];

  function automatic poly_t pmul(input poly_t a, input poly_t b);
    poly_t r;
    r = new[a.size() + b.size() - 1];
    foreach (r[i]) r[i] = '0;
    foreach (a[i]) foreach (b[j]) r[i+j] = r[i+j] + a[i] * b[j];
    return r;
  endfunction

  function automatic poly_t padd(input poly_t a, input poly_t b);
    int n;
    poly_t r;
    n = (a.size() > b.size()) ? a.size() : b.size();
    r = new[n];
    foreach (r[i]) begin
      r[i] = '0;
      if (i < a.size()) r[i] = r[i] + a[i];
      if (i < b.size()) r[i] = r[i] + b[i];
    end
    return r;
  endfunction

  function automatic poly_t prand(input int deg);
    poly_t r;
    r = new[deg + 1];
    foreach (r[i]) r[i] = word_t'($urandom);
    return r;
  endfunction

  // Inverse of an odd word modulo 2**16, found by search over odd words.
  function automatic word_t winv(input word_t a);
    for (int v = 1; v < 65536; v += 2) if (word_t'(a * word_t'(v)) == 16'd1) return word_t'(v);
    return '0;
  endfunction

  // Long division of p by b (leading coefficient odd): q gets degree
  // deg(p) - deg(b), r gets deg(b) coefficients.
  function automatic void pdivmod(input poly_t p, input poly_t b,
                                  output poly_t q, output poly_t r);
    int c, m;
    word_t binv;
    poly_t w;
    c = b.size() - 1;
    m = p.size() - 1 - c;
    binv = winv(b[c]);
    w = p;
    q = new[m + 1];
    for (int j = m; j >= 0; j--) begin
      q[j] = w[j + c] * binv;
      for (int i = 0; i <= c; i++) w[j + i] = w[j + i] - q[j] * b[i];
    end
    r = new[c];
    foreach (r[i]) r[i] = w[i];
  endfunction
endpackage
