// tb_pairing_cryptoprocessor: end-to-end test of the whole cryptoprocessor at
// its default size, GF(2^1223) with f = x^1223 + x^255 + 1.
//
// A program is assembled here, written through the program port, the operands
// are loaded into bank F and the program is started. It has three parts:
//  A. the tower-field squaring and Frobenius (G^2, G^q) sequences, square root,
//     squaring from Gs, multiplications from F/Fs and G/Gs, a StoreMult issued
//     while a new multiplication is running (it must return the older product),
//     IncG0 and MoveBank to H and I and back into G;
//  B. a field inversion by Itoh-Tsujii, a^-1 = (a^(2^(m-1)-1))^2, following an
//     addition chain for m-1 built from its binary expansion; each doubling step
//     raises to 2^k with a For(k) loop of squarings, each multiplication waits
//     for the serial multiplier with Wait;
//  C. MoveBank into F, Jz on both values of a bit of R, and a Jmp-to-self halt.
// Checks: the banks G, V, W and the cycle count against the instruction-level
// model; independently, a * a^-1 = 1; and that every mechanism (wait stall, For
// iteration and exit, Jz taken and not, Jmp, held multiplier result, each of the
// six bank moves, IncG0, Fs/Gs operands, external load, halt) happened.
module tb_pairing_cryptoprocessor;
  import pairing_pkg::*;
  import gf2m_ref_pkg::*;
  import pairing_iss_pkg::*;

  localparam int M = FIELD_M;
  localparam int A = FIELD_A;
  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0;
  logic              prog_we = 0;
  logic [11:0]       prog_waddr = '0;
  logic [15:0]       prog_wdata = '0;
  logic [3:0]        ld_en = '0;
  logic [3:0][M-1:0] ld_data;
  logic              start = 0;
  logic [M-1:0]      r_in;
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
  function automatic int here();
    return prog.size();
  endfunction
  function automatic void emit(logic [15:0] w);
    prog.push_back(w);
  endfunction
  // raise G0 to 2^k with a For loop, then multiply by Fs: G0 = Fs = G0^(2^k) * Fs
  function automatic void it_double(int k);
    int l = here();
    emit(i_ctl(OP_FOR, k));
    emit(i_ctl(OP_JMP, l + 4));
    emit(i_sqr(DST_G, 4'b0001, SRC_G, 4'b0001));
    emit(i_ctl(OP_JMP, l));
    emit(i_ldm(SRC_FS, 4'b0000, SRC_G, 4'b0001));
    emit(i_ctl(OP_WAIT, 8));
    emit(i_stm(DST_G, 4'b0001));
    emit(i_add(DST_S, 4'b0001, SRC_G, 4'b0001));
  endfunction
  // G0 = Fs = G0^2 * a, a in F0
  function automatic void it_inc();
    emit(i_sqr(DST_G, 4'b0001, SRC_G, 4'b0001));
    emit(i_ldm(SRC_F, 4'b0001, SRC_G, 4'b0001));
    emit(i_ctl(OP_WAIT, 8));
    emit(i_stm(DST_G, 4'b0001));
    emit(i_add(DST_S, 4'b0001, SRC_G, 4'b0001));
  endfunction

  function automatic void build_program();
    int k, top, l;
    // ---- part A
    emit(i_add(DST_G, 4'b1001, SRC_F, 4'b0011));   // G0 = G3 = F0 + F1
    emit(i_add(DST_G, 4'b0010, SRC_F, 4'b0100));   // G1 = F2
    emit(i_add(DST_G, 4'b0100, SRC_F, 4'b1000));   // G2 = F3
    emit(i_sqr(DST_W, 4'b0001, SRC_G, 4'b1011));   // W0 = (g0+g1+g3)^2
    emit(i_sqr(DST_W, 4'b0010, SRC_G, 4'b0110));   // W1 = (g1+g2)^2
    emit(i_sqr(DST_W, 4'b0100, SRC_G, 4'b1100));   // W2 = (g2+g3)^2
    emit(i_sqr(DST_W, 4'b1000, SRC_G, 4'b1000));   // W3 = g3^2
    emit(i_add(DST_V, 4'b0001, SRC_G, 4'b0111));   // V0 = g0+g1+g2
    emit(i_add(DST_V, 4'b0010, SRC_G, 4'b1110));   // V1 = g1+g2+g3
    emit(i_add(DST_V, 4'b0100, SRC_G, 4'b1100));   // V2 = g2+g3
    emit(i_add(DST_V, 4'b1000, SRC_G, 4'b1000));   // V3 = g3
    emit(i_inc());                                  // G0 = G0 + 1
    emit(i_sqrt(DST_S, 4'b0010, SRC_F, 4'b0010));  // Gs = sqrt(F1)
    emit(i_sqr(DST_S, 4'b0001, SRC_GS, 4'b0000));  // Fs = Gs^2 (= F1)
    emit(i_ldm(SRC_FS, 4'b0000, SRC_G, 4'b0011));  // 14: Fs * (G0+G1)
    emit(i_mov(MV_DST_H, MV_SRC_V));               // H = V
    emit(i_mov(MV_DST_I, MV_SRC_W));               // I = W
    emit(i_ctl(OP_WAIT, 7));                       // 17..24
    emit(i_stm(DST_V, 4'b0011));                   // 25: V0 = V1 = product 1
    emit(i_ldm(SRC_F, 4'b0100, SRC_GS, 4'b0000));  // 26: F2 * Gs
    emit(i_stm(DST_W, 4'b1000));                   // 27: W3 = product 1 (held)
    emit(i_mov(MV_DST_G, MV_SRC_W));               // G = W
    emit(i_mov(MV_DST_G, MV_SRC_I));               // G = I
    emit(i_ctl(OP_WAIT, 9));
    emit(i_stm(DST_V, 4'b0100));                   // V2 = product 2
    // ---- part B: Itoh-Tsujii inversion of F0
    emit(i_add(DST_S, 4'b0001, SRC_F, 4'b0001));   // Fs = a
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b0001));   // G0 = a   (beta_1)
    top = 0;
    for (int b = 31; b >= 0; b--) if ((M - 1) >> b & 1) begin top = b; break; end
    k = 1;
    for (int b = top - 1; b >= 0; b--) begin
      it_double(k);
      k = 2 * k;
      if ((M - 1) >> b & 1) begin
        it_inc();
        k = k + 1;
      end
    end
    emit(i_sqr(DST_W, 4'b0001, SRC_G, 4'b0001));   // W0 = beta_(m-1)^2 = a^-1
    // ---- part C
    emit(i_mov(MV_DST_F, MV_SRC_H));               // F = H
    emit(i_add(DST_V, 4'b1000, SRC_F, 4'b1111));
    emit(i_mov(MV_DST_F, MV_SRC_V));               // F = V
    emit(i_add(DST_W, 4'b0100, SRC_F, 4'b0101));
    emit(i_add(DST_G, 4'b0001, SRC_F, 4'b0001));
    emit(i_ctl(OP_JZ, 0));                          // R0 = 1: skip next
    emit(i_inc());
    emit(i_ctl(OP_JZ, 0));                          // R0 = 0: fall through
    emit(i_inc());
    l = here();
    emit(i_ctl(OP_JMP, l));                         // halt
  endfunction

  // ---------------------------------------------------------------- monitors
  int n_wait_stall, n_for_iter, n_for_exit, n_jz_taken, n_jz_not, n_jmp, n_held;
  int n_mv [4][4];
  int n_inc, n_fs_src, n_gs_src, n_sqrt, n_ld;
  int cycles;

  instr_t cur;
  assign cur = dut.u_ctrl.instr;

  always @(posedge clk) if (rst_n && dut.u_ctrl.run) begin
    cycles++;
    case (cur.cmd)
      OP_WAIT:      if (dut.u_ctrl.ip_next == ip) n_wait_stall++;
      OP_FOR:       if (dut.u_ctrl.ip_next == ip + 12'd2) n_for_iter++; else n_for_exit++;
      OP_JZ:        if (dut.u_ctrl.ip_next == ip + 12'd2) n_jz_taken++; else n_jz_not++;
      OP_JMP:       n_jmp++;
      OP_STOREMULT: if (mult_busy) n_held++;
      OP_MOVEBANK:  n_mv[cur.op2.bank][cur.op1.bank]++;
      OP_INCG0:     n_inc++;
      OP_SQRT:      n_sqrt++;
      OP_LOADMULT:  begin
                      if (cur.op2.bank == SRC_FS) n_fs_src++;
                      if (cur.op1.bank == SRC_GS) n_gs_src++;
                    end
      OP_SQR:       if (cur.op1.bank == SRC_GS) n_gs_src++;
      default: ;
    endcase
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // ---------------------------------------------------------------- stimulus
  pairing_iss iss;

  initial begin
    elem_t a_val, inv;
    int    iss_cycles;
    iss = new(M, A);
    ld_data = '0;
    r_in = M'(1);
    build_program();
    $display("program: %0d words", prog.size());
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1; prog_waddr = 12'(k); prog_wdata = prog[k];
    end
    @(negedge clk);
    prog_we = 0;
    for (int r = 0; r < 4; r++) begin
      ld_data[r] = M'(rand_elem(M));
      iss.f[r] = elem_t'(ld_data[r]);
    end
    a_val = elem_t'(ld_data[0]);
    ld_en = 4'hF;
    n_ld++;
    @(negedge clk);
    ld_en = '0;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);

    // instruction-level model over the same program
    iss.start(elem_t'(r_in));
    iss_cycles = 0;
    while (!iss.halted) begin
      iss.step(prog[iss.ip], iss_cycles);
      iss_cycles++;
    end

    checks++;
    if (cycles != iss_cycles) begin
      failures++;
      $display("FAIL cycle count %0d, model %0d", cycles, iss_cycles);
    end
    for (int r = 0; r < 4; r++) begin
      checks += 3;
      if (elem_t'(bank_g[r]) !== iss.g[r]) begin failures++; $display("FAIL G%0d", r); end
      if (elem_t'(bank_v[r]) !== iss.v[r]) begin failures++; $display("FAIL V%0d", r); end
      if (elem_t'(bank_w[r]) !== iss.w[r]) begin failures++; $display("FAIL W%0d", r); end
    end
    // the inverse computed by the program, checked without the model
    inv = elem_t'(bank_w[0]);
    checks++;
    if (mul(a_val, inv, M, trinomial(A)) !== elem_t'(1)) begin
      failures++;
      $display("FAIL a * a^-1 != 1");
    end
    $display("pairing processor: %0d cycles", cycles);
    need("Wait stall cycles", n_wait_stall);
    need("For iterations", n_for_iter);
    need("For exits", n_for_exit);
    need("Jz taken (skip)", n_jz_taken);
    need("Jz not taken", n_jz_not);
    need("Jmp", n_jmp);
    need("StoreMult of held result", n_held);
    need("MoveBank V->F", n_mv[MV_DST_F][MV_SRC_V]);
    need("MoveBank V->H", n_mv[MV_DST_H][MV_SRC_V]);
    need("MoveBank H->F", n_mv[MV_DST_F][MV_SRC_H]);
    need("MoveBank W->G", n_mv[MV_DST_G][MV_SRC_W]);
    need("MoveBank W->I", n_mv[MV_DST_I][MV_SRC_W]);
    need("MoveBank I->G", n_mv[MV_DST_G][MV_SRC_I]);
    need("IncG0", n_inc);
    need("SquareRoot", n_sqrt);
    need("Fs operand", n_fs_src);
    need("Gs operand", n_gs_src);
    need("external load of F", n_ld);
    need("halt (done)", int'(done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
