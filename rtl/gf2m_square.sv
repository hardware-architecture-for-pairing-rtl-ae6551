// gf2m_square: squaring in GF(2^m), c = a^2 mod f(x).
//
// In characteristic 2 squaring is linear: a^2 = sum a_i x^(2i), so the input bits
// are spread apart with a 0 between each pair (no logic) and the (2m-1)-bit result
// is reduced with the PLFSR reduction (gf2m_reduce). Combinational, one cycle in
// the datapath.
module gf2m_square #(
  parameter int unsigned  M     = 1223,
  parameter logic [M-1:0] FPOLY = (M'(1) << 255) | M'(1)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);

  logic [2*M-2:0] spread;

  always_comb begin
    spread = '0;
    for (int unsigned i = 0; i < M; i++) spread[2*i] = a[i];
  end

  gf2m_reduce #(.M(M), .FPOLY(FPOLY)) u_red (.g(spread), .r(c));

endmodule
