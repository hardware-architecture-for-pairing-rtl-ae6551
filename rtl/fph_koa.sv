// fph_koa: fully parallel hybrid Karatsuba-Ofman polynomial multiplier (no reduction).
//
// c = a * b with a, b of N coefficients. Each of the S recursion levels uses the
// overlap-free split: the operands are divided into their even-indexed and
// odd-indexed coefficients, a = ae(x^2) + x*ao(x^2), and
//   a*b = pe(x^2) + x*(pm + pe + po)(x^2) + x^2*po(x^2),
// with pe = ae*be, po = ao*bo, pm = (ae+ao)*(be+bo) from three recursive instances.
// Because the sub-products land on interleaved bit positions the recombination
// needs fewer XOR levels than the high/low split. After S levels the recursion is
// truncated and a schoolbook AND/XOR array multiplies the remaining small operands.
// This is the core of the serial multiplier, which feeds it one of nine partial
// operand pairs per clock. Purely combinational.
//
// Lint note: when this module is linted on its own as the top level, Verilator
// reports the three child products (pe, pm and po) as undriven. It does not expand
// a top module's instances of itself in that mode. The warning stands because
// the circuit is correct. Inside a parent such as serial_mult, the recursion
// elaborates without warnings, and the testbenches check every level.
module fph_koa #(
  parameter int unsigned N = 306,
  parameter int unsigned S = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] c
);

  if (S == 0 || N < 2) begin : g_school
    always_comb begin
      c = '0;
      for (int unsigned i = 0; i < N; i++)
        for (int unsigned j = 0; j < N; j++)
          c[i+j] = c[i+j] ^ (a[i] & b[j]);
    end
  end else begin : g_koa
    localparam int unsigned NE = (N + 1) / 2;   // number of even-indexed coefficients
    localparam int unsigned NO = N / 2;         // number of odd-indexed coefficients

    logic [NE-1:0]   ae, be, ao, bo, am, bm;
    logic [2*NE-2:0] pe, pm, pmid;
    logic [2*NO-2:0] po;

    always_comb begin
      ae = '0; be = '0; ao = '0; bo = '0;
      for (int unsigned i = 0; i < NE; i++) begin
        ae[i] = a[2*i];
        be[i] = b[2*i];
      end
      for (int unsigned i = 0; i < NO; i++) begin
        ao[i] = a[2*i+1];
        bo[i] = b[2*i+1];
      end
    end

    assign am = ae ^ ao;
    assign bm = be ^ bo;

    fph_koa #(.N(NE), .S(S-1)) u_pe (.a(ae), .b(be), .c(pe));
    fph_koa #(.N(NO), .S(S-1)) u_po (.a(ao[NO-1:0]), .b(bo[NO-1:0]), .c(po));
    fph_koa #(.N(NE), .S(S-1)) u_pm (.a(am), .b(bm), .c(pm));

    assign pmid = pm ^ pe ^ (2*NE-1)'(po);

    always_comb begin
      c = '0;
      for (int unsigned k = 0; k < 2*NE-1; k++) begin
        c[2*k] = c[2*k] ^ pe[k];
        if (2*k+1 <= 2*N-2) c[2*k+1] = c[2*k+1] ^ pmid[k];
      end
      for (int unsigned k = 0; k < 2*NO-1; k++) c[2*k+2] = c[2*k+2] ^ po[k];
    end
  end

endmodule
