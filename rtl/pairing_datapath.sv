// pairing_datapath: register banks, GF(2^m) arithmetic units and their wiring.
//
// Six banks F, G, H, I, V, W of four m-bit registers each, plus two single
// registers Fs and Gs. Only F, G (through their 4-input adders) and Fs, Gs can
// feed the arithmetic units; only G, V, W (and Fs, Gs) receive results. H and I are
// spill banks for V and W, reached with MoveBank.
//  * The adder on F and the adder on G sum any subset of their bank's registers.
//  * Addition, Squaring and SquareRoot take one source (F sum, G sum, Fs or Gs,
//    merged by OR gates since only one is enabled) and all three units compute in
//    parallel; a 4-input multiplexer (sum, square, root, multiplier output) picks
//    what is written. One clock per instruction; several destination registers
//    may be written with the same value.
//  * LoadMult starts the serial multiplier with (F sum or Fs) x (G sum or Gs);
//    StoreMult writes the multiplier's held result to the destination 9 or more
//    cycles later. Other instructions may run meanwhile.
//  * MoveBank copies a whole bank: V->F, V->H, H->F, W->G, W->I, I->G.
//  * IncG0 computes G0 <= G0 xor 1 (flip of bit 0).
// F can also be written from outside (ld_en, one enable per register), which is
// how the input points are loaded. exec qualifies the instruction; with exec low
// nothing but the external load and the running multiplier changes state.
// Operand coding (see pairing_pkg): Addition/Squaring/SquareRoot read OP1 and
// write OP2; LoadMult takes its F-side operand from OP2 and its G-side operand
// from OP1; StoreMult writes OP2.
module pairing_datapath
  import pairing_pkg::*;
#(
  parameter int unsigned M = 1223,
  parameter int unsigned A = 255,
  parameter int unsigned S = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  exec,
  input  instr_t                instr,
  input  logic [3:0]            ld_en,
  input  logic [3:0][M-1:0]     ld_data,
  output logic [3:0][M-1:0]     bank_g,
  output logic [3:0][M-1:0]     bank_v,
  output logic [3:0][M-1:0]     bank_w,
  output logic                  mult_busy
);

  localparam logic [M-1:0] FPOLY = (M'(1) << A) | M'(1);

  typedef logic [3:0][M-1:0] bank_t;

  bank_t        f_q, g_q, h_q, i_q, v_q, w_q;
  logic [M-1:0] fs_q, gs_q;

  // ------------------------------------------------------------ decode
  opcode_e    cmd;
  logic       is_unary, is_load, is_store, is_move, is_inc;
  logic [3:0] f_re, g_re;
  logic       sel_fs, sel_gs;

  assign cmd      = instr.cmd;
  assign is_unary = exec && (cmd == OP_ADD || cmd == OP_SQR || cmd == OP_SQRT);
  assign is_load  = exec && cmd == OP_LOADMULT;
  assign is_store = exec && cmd == OP_STOREMULT;
  assign is_move  = exec && cmd == OP_MOVEBANK;
  assign is_inc   = exec && cmd == OP_INCG0;

  always_comb begin
    f_re   = '0;
    g_re   = '0;
    sel_fs = 1'b0;
    sel_gs = 1'b0;
    if (is_unary) begin
      f_re   = (instr.op1.bank == SRC_F) ? instr.op1.regs : '0;
      g_re   = (instr.op1.bank == SRC_G) ? instr.op1.regs : '0;
      sel_fs = (instr.op1.bank == SRC_FS);
      sel_gs = (instr.op1.bank == SRC_GS);
    end else if (is_load) begin
      f_re   = (instr.op2.bank == SRC_F) ? instr.op2.regs : '0;
      sel_fs = (instr.op2.bank == SRC_FS);
      g_re   = (instr.op1.bank == SRC_G) ? instr.op1.regs : '0;
      sel_gs = (instr.op1.bank == SRC_GS);
    end
  end

  // ------------------------------------------------------------ arithmetic
  logic [M-1:0] f_sum, g_sum, u_src, m_a, m_b, sq_res, rt_res, mul_res, result;

  bank_adder #(.M(M)) u_add_f (.regs(f_q), .re(f_re), .sum(f_sum));
  bank_adder #(.M(M)) u_add_g (.regs(g_q), .re(g_re), .sum(g_sum));

  // OR-merging of the possible sources: at most one of them is non-zero
  assign u_src = f_sum | g_sum | (sel_fs ? fs_q : '0) | (sel_gs ? gs_q : '0);
  assign m_a   = f_sum | (sel_fs ? fs_q : '0);
  assign m_b   = g_sum | (sel_gs ? gs_q : '0);

  gf2m_square #(.M(M), .FPOLY(FPOLY)) u_sqr  (.a(u_src), .c(sq_res));
  gf2m_sqrt   #(.M(M), .A(A))         u_sqrt (.a(u_src), .d(rt_res));

  serial_mult #(.M(M), .FPOLY(FPOLY), .S(S)) u_mult (
    .clk, .rst_n, .start(is_load), .a(m_a), .b(m_b), .c(mul_res),
    .busy(mult_busy), .done()
  );

  always_comb begin
    unique case (cmd)
      OP_SQR:       result = sq_res;
      OP_SQRT:      result = rt_res;
      OP_STOREMULT: result = mul_res;
      default:      result = u_src;
    endcase
  end

  // ------------------------------------------------------------ register banks
  logic       wr_res;
  logic [1:0] dst, mv_src, mv_dst;

  assign wr_res = is_unary || is_store;
  assign dst    = instr.op2.bank;
  assign mv_src = instr.op1.bank;
  assign mv_dst = instr.op2.bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q  <= '0;  g_q <= '0;  h_q <= '0;
      i_q  <= '0;  v_q <= '0;  w_q <= '0;
      fs_q <= '0;  gs_q <= '0;
    end else begin
      // bank F: external input or MoveBank from V/H
      for (int r = 0; r < 4; r++)
        if (ld_en[r]) f_q[r] <= ld_data[r];
      if (is_move && mv_dst == MV_DST_F)
        f_q <= (mv_src == MV_SRC_H) ? h_q : v_q;
      if (is_move && mv_dst == MV_DST_H) h_q <= v_q;
      if (is_move && mv_dst == MV_DST_I) i_q <= w_q;
      // bank G: arithmetic result or MoveBank from W/I
      if (is_move && mv_dst == MV_DST_G)
        g_q <= (mv_src == MV_SRC_I) ? i_q : w_q;
      if (wr_res) begin
        for (int r = 0; r < 4; r++) begin
          if (dst == DST_G && instr.op2.regs[r]) g_q[r] <= result;
          if (dst == DST_V && instr.op2.regs[r]) v_q[r] <= result;
          if (dst == DST_W && instr.op2.regs[r]) w_q[r] <= result;
        end
        if (dst == DST_S && instr.op2.regs[0]) fs_q <= result;
        if (dst == DST_S && instr.op2.regs[1]) gs_q <= result;
      end
      if (is_inc) g_q[0][0] <= ~g_q[0][0];
    end
  end

  assign bank_g = g_q;
  assign bank_v = v_q;
  assign bank_w = w_q;

  // ------------------------------------------------------------ operand rules
  // the multiplier's first operand must come from F/Fs and its second from G/Gs
  a_load_sides: assert property (@(posedge clk) disable iff (!rst_n)
    is_load |-> (instr.op2.bank == SRC_F || instr.op2.bank == SRC_FS) &&
    (instr.op1.bank == SRC_G || instr.op1.bank == SRC_GS));
  // only the six bank moves the wiring provides
  a_move_pairs: assert property (@(posedge clk) disable iff (!rst_n)
    is_move |-> ((mv_dst == MV_DST_F && (mv_src == MV_SRC_V || mv_src == MV_SRC_H)) ||
                 (mv_dst == MV_DST_H && mv_src == MV_SRC_V) ||
                 (mv_dst == MV_DST_G && (mv_src == MV_SRC_W || mv_src == MV_SRC_I)) ||
                 (mv_dst == MV_DST_I && mv_src == MV_SRC_W)));
  // the external load of F must not collide with a MoveBank into F
  a_f_load: assert property (@(posedge clk) disable iff (!rst_n)
    !(ld_en != '0 && is_move && mv_dst == MV_DST_F));

endmodule
