// tb_koa_lfsr_mult: checks the fully parallel KOA-LFSR multiplier against the
// bit-serial reference for three fields of the validation set: GF(2^163) with a
// pentanomial (module default), GF(2^233) with the trinomial x^233 + x^74 + 1 and
// GF(2^131) with the pentanomial x^131 + x^13 + x^2 + x + 1. Random operands plus
// the corner cases 0, 1 and all-ones.
module tb_koa_lfsr_mult;
  import gf2m_ref_pkg::*;

  localparam int M1 = 163;
  localparam int M2 = 233;
  localparam int M3 = 131;
  localparam logic [M2-1:0] F2 = (M2'(1) << 74) | M2'(1);
  localparam logic [M3-1:0] F3 = M3'('h2007);

  int checks = 0, failures = 0;

  logic [M1-1:0] a1, b1, c1;
  logic [M2-1:0] a2, b2, c2;
  logic [M3-1:0] a3, b3, c3;

  koa_lfsr_mult                                 dut1 (.a(a1), .b(b1), .c(c1));
  koa_lfsr_mult #(.M(M2), .FPOLY(F2), .TH(8))   dut2 (.a(a2), .b(b2), .c(c2));
  koa_lfsr_mult #(.M(M3), .FPOLY(F3))           dut3 (.a(a3), .b(b3), .c(c3));

  task automatic check(string tag, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL %s got %h exp %h", tag, got, exp);
    end
  endtask

  initial begin
    elem_t x, y;
    elem_t f1, f2, f3;
    f1 = elem_t'('hC9);
    f2 = trinomial(74);
    f3 = elem_t'('h2007);
    for (int t = 0; t < 203; t++) begin
      x = rand_elem(M1); y = rand_elem(M1);
      if (t == 0) x = '0;
      if (t == 1) x = 1;
      if (t == 2) begin x = mask(M1); y = mask(M1); end
      a1 = x[M1-1:0]; b1 = y[M1-1:0];
      a2 = M2'(rand_elem(M2)); b2 = M2'(rand_elem(M2));
      a3 = M3'(rand_elem(M3)); b3 = M3'(rand_elem(M3));
      if (t == 2) begin a2 = '1; b2 = '1; a3 = '1; b3 = '1; end
      #1;
      check("m163", elem_t'(c1), mul(elem_t'(a1), elem_t'(b1), M1, f1));
      check("m233", elem_t'(c2), mul(elem_t'(a2), elem_t'(b2), M2, f2));
      check("m131", elem_t'(c3), mul(elem_t'(a3), elem_t'(b3), M3, f3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
