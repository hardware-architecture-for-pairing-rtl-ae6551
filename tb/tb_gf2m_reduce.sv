// tb_gf2m_reduce: checks the PLFSR reduction of (2m-1)-bit products at the
// design's field GF(2^1223), f = x^1223 + x^255 + 1. The stimulus is the
// polynomial product of two random elements; the expected value is the
// bit-serial modular product, computed without any reduction of a long vector.
module tb_gf2m_reduce;
  import gf2m_ref_pkg::*;

  localparam int M = 1223;
  int checks = 0, failures = 0;

  logic [2*M-2:0] g;
  logic [M-1:0]   r;

  gf2m_reduce dut (.g(g), .r(r));

  initial begin
    elem_t x, y, f;
    elem_t [1:0] p;
    f = trinomial(255);
    for (int t = 0; t < 40; t++) begin
      x = rand_elem(M); y = rand_elem(M);
      if (t == 0) begin x = mask(M); y = mask(M); end
      if (t == 1) begin x = '0; x[M-1] = 1'b1; y = x; end   // x^(2m-2)
      p = pmul(x, y, M);
      g = (2*M-1)'(p);
      #1;
      checks++;
      if (elem_t'(r) !== mul(x, y, M, f)) begin
        failures++;
        $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
