// tb_gf2m_square: squaring in GF(2^1223) against the reference a*a mod f.
module tb_gf2m_square;
  import gf2m_ref_pkg::*;

  localparam int M = 1223;
  int checks = 0, failures = 0;

  logic [M-1:0] a, c;

  gf2m_square dut (.a(a), .c(c));

  initial begin
    elem_t x, f;
    f = trinomial(255);
    for (int t = 0; t < 40; t++) begin
      x = rand_elem(M);
      if (t == 0) x = mask(M);
      if (t == 1) x = elem_t'(1) << (M - 1);
      a = M'(x);
      #1;
      checks++;
      if (elem_t'(c) !== sqr(x, M, f)) begin
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
