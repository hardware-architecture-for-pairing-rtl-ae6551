// tb_gf2m_sqrt: square root in GF(2^1223). The result d must satisfy d*d = a
// (reference multiplication), and every unit vector x^i is also checked.
module tb_gf2m_sqrt;
  import gf2m_ref_pkg::*;

  localparam int M = 1223;
  int checks = 0, failures = 0;

  logic [M-1:0] a, d;

  gf2m_sqrt dut (.a(a), .d(d));

  initial begin
    elem_t x, f;
    f = trinomial(255);
    for (int t = 0; t < 60; t++) begin
      x = rand_elem(M);
      if (t < 20) x = elem_t'(1) << (t * 61);   // unit vectors across the word
      if (t == 20) x = mask(M);
      a = M'(x);
      #1;
      checks++;
      if (sqr(elem_t'(d), M, f) !== x) begin
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
