// gf2m_ref_pkg: bit-serial reference arithmetic in GF(2^m) for the testbenches.
//
// Deliberately unlike the RTL: multiplication is the textbook left-to-right
// shift-and-add with a reduction after every shift, squaring is a
// multiplication by itself, and the field size and polynomial are run-time
// arguments. Elements are held in MAXW-bit vectors, upper bits zero.
package gf2m_ref_pkg;

  localparam int MAXW = 1280;
  typedef logic [MAXW-1:0] elem_t;

  function automatic elem_t mask(int m);
    elem_t k;
    k = '0;
    for (int i = 0; i < m; i++) k[i] = 1'b1;
    return k;
  endfunction

  // x * a mod f, where fpoly holds f_0..f_{m-1}
  function automatic elem_t mulx(elem_t a, int m, elem_t fpoly);
    logic top;
    top = a[m-1];
    a    = a << 1;
    a[m] = 1'b0;
    if (top) a = a ^ fpoly;
    return a;
  endfunction

  function automatic elem_t mul(elem_t a, elem_t b, int m, elem_t fpoly);
    elem_t r;
    r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = mulx(r, m, fpoly);
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  function automatic elem_t sqr(elem_t a, int m, elem_t fpoly);
    return mul(a, a, m, fpoly);
  endfunction

  function automatic elem_t rand_elem(int m);
    elem_t r;
    for (int i = 0; i < MAXW / 32; i++) r[i*32 +: 32] = $urandom;
    return r & mask(m);
  endfunction

  function automatic elem_t trinomial(int a);
    elem_t f;
    f = '0;
    f[0] = 1'b1;
    f[a] = 1'b1;
    return f;
  endfunction

  // polynomial product without reduction (2m-1 coefficients)
  function automatic elem_t [1:0] pmul(elem_t a, elem_t b, int n);
    logic [2*MAXW-1:0] r;
    r = '0;
    for (int i = 0; i < n; i++)
      if (b[i]) r = r ^ ({{MAXW{1'b0}}, a} << i);
    return r;
  endfunction

endpackage
