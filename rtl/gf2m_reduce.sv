// gf2m_reduce: reduction of a (2m-1)-bit polynomial g(x) modulo f(x).
//
// g is split as g2(x)*x^m + g1(x). g1 is already reduced; g2*x^m mod f is produced
// by a parallel LFSR of m stages (plfsr), and the two parts are added.
// Interface: g (2m-1 bits) in, r (m bits) out. Purely combinational.
module gf2m_reduce #(
  parameter int unsigned  M     = 1223,
  parameter logic [M-1:0] FPOLY = (M'(1) << 255) | M'(1)
) (
  input  logic [2*M-2:0] g,
  output logic [M-1:0]   r
);

  logic [M-1:0] hi, hi_red;

  assign hi = {1'b0, g[2*M-2:M]};

  plfsr #(.M(M), .FPOLY(FPOLY), .D(M)) u_plfsr (.a(hi), .y(hi_red));

  assign r = hi_red ^ g[M-1:0];

endmodule
