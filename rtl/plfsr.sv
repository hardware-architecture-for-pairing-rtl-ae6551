// plfsr: parallel linear feedback shift register, y = x^D * a mod f(x).
//
// One CL-LFSR stage computes x*A mod f: the vector is shifted up by one place and,
// when the bit shifted out (a_{m-1}) is 1, the low-order coefficients of f are
// XORed in. D such stages are chained combinationally, so x^D*A mod f is produced
// in a single pass. For a trinomial each stage costs one XOR gate and the chain is
// only one or two XOR gates deep. FPOLY holds f_0..f_{m-1}; the irreducible
// polynomial may be a trinomial or a pentanomial.
// Interface: a (m bits, already reduced) in, y (m bits) out. Purely combinational.
module plfsr #(
  parameter int unsigned     M     = 1223,
  parameter logic [M-1:0]    FPOLY = (M'(1) << 255) | M'(1),
  parameter int unsigned     D     = M
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  always_comb begin
    logic [M-1:0] v;
    v = a;
    for (int unsigned i = 0; i < D; i++) begin
      v = {v[M-2:0], 1'b0} ^ (v[M-1] ? FPOLY : '0);
    end
    y = v;
  end

endmodule
