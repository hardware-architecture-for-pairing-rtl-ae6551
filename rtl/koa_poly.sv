// koa_poly: recursive Karatsuba-Ofman polynomial multiplier over GF(2), no reduction.
//
// c = a * b with a, b of N coefficients and c of 2N-1. The operands are split into a
// low half of ceil(N/2) bits and a high half of N-ceil(N/2) bits; three half-size
// products are formed by recursive instances,
//   z0 = aL*bL, z2 = aH*bH, z1 = (aL+aH)*(bL+bH) + z0 + z2,
// and combined with plain shifts, c = z2*x^(2L) + z1*x^L + z0. The recursion stops
// at N <= TH, where a schoolbook (AND/XOR array) multiplier is used; TH = 1 is the
// single AND gate of the textbook recursion. These are the n < m calls of the
// KOA-LFSR multiplier. Purely combinational.
//
// Lint note: when this module is linted on its own as the top level, Verilator
// reports the three child products (z0, zm and z2) as undriven. It does not expand
// a top module's instances of itself in that mode. The warning stands because
// the circuit is correct. Inside a parent such as koa_lfsr_mult, the recursion
// elaborates without warnings, and the testbenches check every level.
module koa_poly #(
  parameter int unsigned N  = 82,
  parameter int unsigned TH = 1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  if (N <= TH || N < 2) begin : g_school
    always_comb begin
      c = '0;
      for (int unsigned i = 0; i < N; i++)
        for (int unsigned j = 0; j < N; j++)
          c[i+j] = c[i+j] ^ (a[i] & b[j]);
    end
  end else begin : g_koa
    localparam int unsigned L = (N + 1) / 2;
    localparam int unsigned H = N - L;

    logic [L-1:0]   al, bl, am, bm;
    logic [L-1:0]   ah, bh;          // high halves zero-extended to L bits
    logic [2*L-2:0] z0, zm;
    logic [2*H-2:0] z2;
    logic [2*L-2:0] z1;

    assign al = a[L-1:0];
    assign bl = b[L-1:0];
    assign ah = L'(a[N-1:L]);
    assign bh = L'(b[N-1:L]);
    assign am = al ^ ah;
    assign bm = bl ^ bh;

    koa_poly #(.N(L), .TH(TH)) u_z0 (.a(al), .b(bl), .c(z0));
    koa_poly #(.N(H), .TH(TH)) u_z2 (.a(a[N-1:L]), .b(b[N-1:L]), .c(z2));
    koa_poly #(.N(L), .TH(TH)) u_zm (.a(am), .b(bm), .c(zm));

    assign z1 = zm ^ z0 ^ (2*L-1)'(z2);

    always_comb begin
      c = (2*N-1)'(z0);
      c = c ^ ((2*N-1)'(z1) << L);
      c = c ^ ((2*N-1)'(z2) << (2*L));
    end
  end

endmodule
