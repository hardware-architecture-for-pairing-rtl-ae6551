// gf2m_sqrt: square root in GF(2^m) for a trinomial f(x) = x^m + x^a + 1 (m, a odd).
//
// Write A = Ae(x^2) + x*Ao(x^2) with Ae the even-indexed and Ao the odd-indexed
// coefficients. Then sqrt(A) = Ae(x) + sqrt(x)*Ao(x), and for this trinomial
// sqrt(x) = x^((m+1)/2) + x^((a+1)/2). Neither product exceeds degree m-1, so no
// reduction is needed and the whole operation is (m-1)/2 two-input XOR gates,
// one gate deep. Bit by bit:
//   d_i = a_2i                  i <  (a+1)/2
//   d_i = a_2i + a_(2i-a)       (a+1)/2 <= i < (m+1)/2
//   d_i = a_(2i-a) + a_(2i-m)   (m+1)/2 <= i < (m+a)/2
//   d_i = a_(2i-m)              (m+a)/2 <= i < m
// Combinational, one cycle in the datapath.
module gf2m_sqrt #(
  parameter int unsigned M = 1223,
  parameter int unsigned A = 255
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] d
);

  initial begin
    assert (M % 2 == 1 && A % 2 == 1 && A < M)
      else $error("gf2m_sqrt needs odd m and odd a < m");
  end

  always_comb begin
    d = '0;
    for (int unsigned i = 0; i < M; i++) begin
      if (i < (M + 1) / 2)                       d[i] = d[i] ^ a[2*i];
      if (i >= (A + 1) / 2 && i < (M + A) / 2)   d[i] = d[i] ^ a[2*i-A];
      if (i >= (M + 1) / 2)                      d[i] = d[i] ^ a[2*i-M];
    end
  end

endmodule
