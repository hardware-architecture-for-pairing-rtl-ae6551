// koa_lfsr_mult: fully parallel KOA-LFSR multiplier, c = a * b mod f(x) in GF(2^m).
//
// The top-level Karatsuba-Ofman call (n = m) splits each operand into a low part of
// ceil(m/2) bits and a high part of the rest, and computes the three half-size
// products z0, z2 and z1 with recursive, reduction-free KOA (koa_poly). Instead of
// forming the (2m-1)-bit product and reducing it afterwards, the reduction is folded
// into the final combination:
//   c = (z2 * x^(2L) mod f) + (z1 * x^L mod f) + z0,    L = ceil(m/2),
// where the two shifted terms are produced by parallel LFSRs (plfsr) of 2L and L
// stages. z0 and z1 have at most 2L-1 <= m coefficients and so need no reduction.
// Works for any irreducible f given as FPOLY (trinomials and pentanomials alike).
// The default is the NIST field GF(2^163), f = x^163 + x^7 + x^6 + x^3 + 1.
// TH sets where the recursion switches to a schoolbook multiplier (1 = plain KOA down
// to single AND gates). Purely combinational.
module koa_lfsr_mult #(
  parameter int unsigned  M     = 163,
  parameter logic [M-1:0] FPOLY = M'('hC9),
  parameter int unsigned  TH    = 1
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);

  localparam int unsigned L = (M + 1) / 2;
  localparam int unsigned H = M - L;

  logic [L-1:0]   al, bl, ah, bh, am, bm;
  logic [2*L-2:0] z0, zm, z1;
  logic [2*H-2:0] z2;
  logic [M-1:0]   z2_red, z1_red;

  assign al = a[L-1:0];
  assign bl = b[L-1:0];
  assign ah = L'(a[M-1:L]);
  assign bh = L'(b[M-1:L]);
  assign am = al ^ ah;
  assign bm = bl ^ bh;

  koa_poly #(.N(L), .TH(TH)) u_z0 (.a(al), .b(bl), .c(z0));
  koa_poly #(.N(H), .TH(TH)) u_z2 (.a(a[M-1:L]), .b(b[M-1:L]), .c(z2));
  koa_poly #(.N(L), .TH(TH)) u_zm (.a(am), .b(bm), .c(zm));

  assign z1 = zm ^ z0 ^ (2*L-1)'(z2);

  plfsr #(.M(M), .FPOLY(FPOLY), .D(2*L)) u_red2 (.a(M'(z2)), .y(z2_red));
  plfsr #(.M(M), .FPOLY(FPOLY), .D(L))   u_red1 (.a(M'(z1)), .y(z1_red));

  assign c = z2_red ^ z1_red ^ M'(z0);

endmodule
