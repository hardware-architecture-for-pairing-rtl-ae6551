// tb_eta_t_miller: the Miller loop of the eta_T pairing (Barreto-Beuchat form)
// run as a program on the full-size cryptoprocessor, GF(2^1223).
//
// The loop keeps F in GF(q^4), q = 2^1223, with the tower
// GF(q^2) = GF(q)[u]/(u^2+u+1) and GF(q^4) = GF(q^2)[v]/(v^2+v+u), and the
// basis (1, u, v, uv). Starting from s = x1+1 and
//   F = s(x1+x2+1) + y1 + y2 + (y2+s)u + v,
// each of the (m+1)/2 = 612 iterations does
//   s = x1; x1 = sqrt(x1); y1 = sqrt(y1);
//   G = s(x1+x2) + y1 + y2 + x1 + 1 + (s+x2)u + v;
//   x2 = x2^2; y2 = y2^2; F = F*G.
// F*G is the sparse product: with F = a + bv, G = c + v (a, b, c in GF(q^2))
// it is (ac + bu) + (a + bc + b)v, six GF(q) multiplications by Karatsuba.
//
// Program layout. The points (x1, y1, x2, y2) enter in bank F through the load
// port. Between iterations they live in bank G (copied to I during the
// iteration), F holds the accumulator and the new F is built in V. Products
// are parked in G next to copies of F coordinates so that one bank addition
// forms each new coordinate; g0 and g1 are kept in W so that MoveBank W->G can
// bring them back. Every StoreMult is placed exactly ten cycles after its
// LoadMult, padded with Wait where needed.
//
// Checks, against a reference written independently of the program (a full
// schoolbook GF(q^4) product in the tower, not the sparse formula, and square
// roots obtained by precomputing the squaring chain backwards): the final F
// (bank V) and the final points (bank G), the number of loop iterations, and
// that each iteration takes exactly the cycles its instructions call for.
// The inputs are random field elements, not curve points: the arithmetic of the
// loop is checked, not the bilinearity of the result.
module tb_eta_t_miller;
  import pairing_pkg::*;
  import gf2m_ref_pkg::*;
  import pairing_iss_pkg::*;

  localparam int M     = FIELD_M;
  localparam int A     = FIELD_A;
  localparam int ITERS = (M + 1) / 2;
  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0;
  logic              prog_we = 0;
  logic [11:0]       prog_waddr = '0;
  logic [15:0]       prog_wdata = '0;
  logic [3:0]        ld_en = '0;
  logic [3:0][M-1:0] ld_data;
  logic              start = 0;
  logic [M-1:0]      r_in = '0;
  logic              busy, done, mult_busy;
  logic [11:0]       ip;
  logic [3:0][M-1:0] bank_g, bank_v, bank_w;

  pairing_cryptoprocessor dut (
    .clk, .rst_n, .prog_we, .prog_waddr, .prog_wdata, .ld_en, .ld_data,
    .start, .r_in, .busy, .done, .mult_busy, .ip, .bank_g, .bank_v, .bank_w
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- assembler
  logic [15:0] prog [$];
  int          since_ldm;   // single-cycle instructions issued since LoadMult
  int          body_cycles; // cycles of the words emitted while counting
  bit          counting;

  function automatic void emit(logic [15:0] w, int cyc = 1);
    prog.push_back(w);
    since_ldm += cyc;
    if (counting) body_cycles += cyc;
  endfunction
  function automatic void ldm(logic [1:0] fb, logic [3:0] fr, logic [1:0] gb, logic [3:0] gr);
    emit(i_ldm(fb, fr, gb, gr));
    since_ldm = 0;
  endfunction
  // StoreMult no earlier than ten cycles after the LoadMult
  function automatic void stm(logic [1:0] db, logic [3:0] dr);
    if (since_ldm <= 8) emit(i_ctl(OP_WAIT, 8 - since_ldm), 9 - since_ldm);
    emit(i_stm(db, dr));
  endfunction

  int loop_ip;

  function automatic void build_program();
    int exit_ip;
    // ---- initial F from P = (x1, y1), Q = (x2, y2) in F0..F3
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b0001));   // G0 = x1
    emit(i_inc());                                  // G0 = s = x1 + 1
    emit(i_add(DST_G, 4'b0010, SRC_F, 4'b0100));   // G1 = x2
    emit(i_add(DST_S, 4'b0001, SRC_G, 4'b0001));   // Fs = s
    ldm(SRC_FS, 4'b0000, SRC_G, 4'b0011);          // s * (x1 + x2 + 1)
    emit(i_add(DST_G, 4'b0100, SRC_F, 4'b1010));   // G2 = y1 + y2
    emit(i_add(DST_G, 4'b1000, SRC_F, 4'b1000));   // G3 = y2
    emit(i_add(DST_V, 4'b0010, SRC_G, 4'b1001));   // V1 = f1 = y2 + s
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b0000));   // G0 = 0
    emit(i_inc());                                  // G0 = 1
    emit(i_add(DST_V, 4'b0100, SRC_G, 4'b0001));   // V2 = f2 = 1
    emit(i_add(DST_V, 4'b1000, SRC_F, 4'b0000));   // V3 = f3 = 0
    for (int r = 0; r < 4; r++)
      emit(i_add(DST_W, 4'(1 << r), SRC_F, 4'(1 << r)));  // W = points
    stm(DST_G, 4'b0010);                            // G1 = s(x1+x2+1)
    emit(i_add(DST_V, 4'b0001, SRC_G, 4'b0110));   // V0 = f0
    emit(i_mov(MV_DST_G, MV_SRC_W));                // G = points
    emit(i_mov(MV_DST_F, MV_SRC_V));                // F = initial F
    // ---- Miller loop
    loop_ip = prog.size();
    emit(i_ctl(OP_FOR, ITERS));
    exit_ip = prog.size();
    emit(i_ctl(OP_JMP, 0));                         // patched below
    counting = 1;
    // line function G
    emit(i_add(DST_S, 4'b0001, SRC_G, 4'b0001));   // Fs = s = x1
    emit(i_add(DST_S, 4'b0010, SRC_G, 4'b0101));   // Gs = g1 = s + x2
    emit(i_sqrt(DST_W, 4'b0001, SRC_G, 4'b0001));  // W0 = sqrt(x1)
    emit(i_sqrt(DST_W, 4'b0010, SRC_G, 4'b0010));  // W1 = sqrt(y1)
    emit(i_sqr(DST_W, 4'b0100, SRC_G, 4'b0100));   // W2 = x2^2
    emit(i_sqr(DST_W, 4'b1000, SRC_G, 4'b1000));   // W3 = y2^2
    emit(i_mov(MV_DST_I, MV_SRC_W));                // I = next points
    emit(i_sqrt(DST_G, 4'b0001, SRC_G, 4'b0001));  // G0 = x1'
    emit(i_sqrt(DST_G, 4'b0010, SRC_G, 4'b0010));  // G1 = y1'
    ldm(SRC_FS, 4'b0000, SRC_G, 4'b0101);          // s * (x1' + x2)
    emit(i_add(DST_G, 4'b0001, SRC_G, 4'b1011));   // G0 = x1' + y1' + y2
    emit(i_inc());                                  // ... + 1
    stm(DST_G, 4'b0100);                            // G2 = s(x1' + x2)
    emit(i_add(DST_W, 4'b0001, SRC_G, 4'b0101));   // W0 = g0
    emit(i_add(DST_W, 4'b0010, SRC_GS, 4'b0000));  // W1 = g1
    emit(i_mov(MV_DST_G, MV_SRC_W));                // G = (g0, g1, ., .)
    // F = F * G, first half: a*c + b*u
    ldm(SRC_F, 4'b0001, SRC_G, 4'b0001);           // p1 = f0 g0
    stm(DST_G, 4'b0100);
    ldm(SRC_F, 4'b0010, SRC_G, 4'b0010);           // p2 = f1 g1
    stm(DST_G, 4'b1000);
    ldm(SRC_F, 4'b0011, SRC_G, 4'b0011);           // p3 = (f0+f1)(g0+g1)
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b1000));   // G0 = f3
    emit(i_add(DST_V, 4'b0001, SRC_G, 4'b1101));   // V0 = p1 + p2 + f3
    emit(i_add(DST_G, 4'b1000, SRC_F, 4'b0100));   // G3 = f2
    stm(DST_G, 4'b0010);                            // G1 = p3
    emit(i_add(DST_V, 4'b0010, SRC_G, 4'b1111));   // V1 = p1 + p3 + f2 + f3
    emit(i_mov(MV_DST_G, MV_SRC_W));                // G = (g0, g1, ., .) again
    // second half: a + b*c + b
    ldm(SRC_F, 4'b0100, SRC_G, 4'b0001);           // p4 = f2 g0
    stm(DST_G, 4'b0100);
    ldm(SRC_F, 4'b1000, SRC_G, 4'b0010);           // p5 = f3 g1
    stm(DST_G, 4'b1000);
    ldm(SRC_F, 4'b1100, SRC_G, 4'b0011);           // p6 = (f2+f3)(g0+g1)
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b0101));   // G0 = f0 + f2
    emit(i_add(DST_V, 4'b0100, SRC_G, 4'b1101));   // V2 = f0 + f2 + p4 + p5
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b1010));   // G0 = f1 + f3
    stm(DST_G, 4'b1000);                            // G3 = p6
    emit(i_add(DST_V, 4'b1000, SRC_G, 4'b1101));   // V3 = f1 + f3 + p4 + p6
    emit(i_mov(MV_DST_F, MV_SRC_V));                // F = F * G
    emit(i_mov(MV_DST_G, MV_SRC_I));                // G = next points
    counting = 0;
    emit(i_ctl(OP_JMP, loop_ip));
    prog[exit_ip] = i_ctl(OP_JMP, prog.size());
    emit(i_ctl(OP_JMP, prog.size()));               // halt
  endfunction

  // ---------------------------------------------------------------- reference
  elem_t fp;
  function automatic elem_t fm(elem_t a, elem_t b);
    return mul(a, b, M, fp);
  endfunction
  // schoolbook product in GF(q^4), basis (1, u, v, uv)
  function automatic void f4mul(ref elem_t r[4], input elem_t a[4], input elem_t b[4]);
    elem_t ac[2], ad[2], bc[2], bd[2];
    elem_t t[4];
    f2mul(ac, a[0], a[1], b[0], b[1]);
    f2mul(ad, a[0], a[1], b[2], b[3]);
    f2mul(bc, a[2], a[3], b[0], b[1]);
    f2mul(bd, a[2], a[3], b[2], b[3]);
    // (A + Bv)(C + Dv) = AC + BD*u + (AD + BC + BD) v ; (x0 + x1 u) u = x1 + (x0 + x1) u
    t[0] = ac[0] ^ bd[1];
    t[1] = ac[1] ^ bd[0] ^ bd[1];
    t[2] = ad[0] ^ bc[0] ^ bd[0];
    t[3] = ad[1] ^ bc[1] ^ bd[1];
    r = t;
  endfunction
  function automatic void f2mul(ref elem_t r[2], input elem_t a0, a1, b0, b1);
    elem_t hh;
    hh   = fm(a1, b1);
    r[0] = fm(a0, b0) ^ hh;
    r[1] = fm(a0, b1) ^ fm(a1, b0) ^ hh;
  endfunction

  // ---------------------------------------------------------------- monitors
  int cycles, n_iter, last_for, bad_iter;
  always @(posedge clk) if (rst_n && dut.u_ctrl.run) begin
    cycles++;
    if (ip == 12'(loop_ip)) begin
      if (last_for != 0 && cycles - last_for != body_cycles + 2) bad_iter++;
      if (dut.u_ctrl.ip_next == ip + 12'd2) n_iter++;
      last_for = cycles;
    end
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    elem_t xs[], ys[];
    elem_t x1, y1, x2, y2, s;
    elem_t fr[4], gr[4];
    fp = trinomial(A);
    ld_data = '0;
    build_program();
    $display("program: %0d words, %0d cycles per iteration", prog.size(), body_cycles + 2);

    // x1 and y1 are taken along a squaring chain, so their square roots are known
    xs = new[ITERS + 1];
    ys = new[ITERS + 1];
    xs[0] = rand_elem(M);
    ys[0] = rand_elem(M);
    for (int k = 1; k <= ITERS; k++) begin
      xs[k] = fm(xs[k-1], xs[k-1]);
      ys[k] = fm(ys[k-1], ys[k-1]);
    end
    x1 = xs[ITERS];
    y1 = ys[ITERS];
    x2 = rand_elem(M);
    y2 = rand_elem(M);
    ld_data[0] = M'(x1);
    ld_data[1] = M'(y1);
    ld_data[2] = M'(x2);
    ld_data[3] = M'(y2);

    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1; prog_waddr = 12'(k); prog_wdata = prog[k];
    end
    @(negedge clk);
    prog_we = 0;
    ld_en = 4'hF;
    @(negedge clk);
    ld_en = '0;
    start = 1;
    @(negedge clk);
    start = 0;

    // reference Miller loop while the processor runs
    s     = x1 ^ elem_t'(1);
    fr[0] = fm(s, x1 ^ x2 ^ elem_t'(1)) ^ y1 ^ y2;
    fr[1] = y2 ^ s;
    fr[2] = elem_t'(1);
    fr[3] = '0;
    for (int i = 1; i <= ITERS; i++) begin
      s  = x1;
      x1 = xs[ITERS - i];
      y1 = ys[ITERS - i];
      gr[0] = fm(s, x1 ^ x2) ^ y1 ^ y2 ^ x1 ^ elem_t'(1);
      gr[1] = s ^ x2;
      gr[2] = elem_t'(1);
      gr[3] = '0;
      x2 = fm(x2, x2);
      y2 = fm(y2, y2);
      f4mul(fr, fr, gr);
    end

    wait (done);
    @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (elem_t'(bank_v[r]) !== fr[r]) begin failures++; $display("FAIL F coordinate %0d", r); end
    end
    checks += 4;
    if (elem_t'(bank_g[0]) !== x1) begin failures++; $display("FAIL x1"); end
    if (elem_t'(bank_g[1]) !== y1) begin failures++; $display("FAIL y1"); end
    if (elem_t'(bank_g[2]) !== x2) begin failures++; $display("FAIL x2"); end
    if (elem_t'(bank_g[3]) !== y2) begin failures++; $display("FAIL y2"); end
    checks++;
    if (n_iter != ITERS) begin failures++; $display("FAIL %0d iterations", n_iter); end
    checks++;
    if (bad_iter != 0) begin failures++; $display("FAIL %0d iterations off the expected length", bad_iter); end
    $display("Miller loop: %0d iterations, %0d cycles in all", n_iter, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
