// tb_fph_koa: the fully parallel hybrid KOA core at its size in the design
// (306-bit operands, 4 overlap-free levels, then schoolbook) and at an odd size
// (77 bits, 2 levels), against a shift-and-XOR polynomial product.
module tb_fph_koa;
  import gf2m_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [305:0] a1, b1;
  logic [610:0] c1;
  logic [76:0]  a2, b2;
  logic [152:0] c2;

  fph_koa                  dut1 (.a(a1), .b(b1), .c(c1));
  fph_koa #(.N(77), .S(2)) dut2 (.a(a2), .b(b2), .c(c2));

  initial begin
    elem_t x, y, u, v;
    elem_t [1:0] p, q;
    for (int t = 0; t < 100; t++) begin
      x = rand_elem(306); y = rand_elem(306);
      u = rand_elem(77);  v = rand_elem(77);
      if (t == 0) begin x = mask(306); y = mask(306); u = mask(77); v = mask(77); end
      a1 = 306'(x); b1 = 306'(y); a2 = 77'(u); b2 = 77'(v);
      p = pmul(x, y, 306);
      q = pmul(u, v, 77);
      #1;
      checks += 2;
      if (c1 !== 611'(p)) begin failures++; $display("FAIL 306 t=%0d", t); end
      if (c2 !== 153'(q)) begin failures++; $display("FAIL 77 t=%0d", t); end
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
