// pairing_iss_pkg: instruction-level reference model of the pairing
// cryptoprocessor, plus helpers that assemble instruction words.
//
// The model keeps the architectural state (banks F, G, H, I, V, W, registers Fs,
// Gs, the multiplier's held result, IP, loop/wait counters, R) and executes one
// instruction per call, with the arithmetic done by gf2m_ref_pkg. The multiplier
// is modelled only by its timing contract: a product started by LoadMult in cycle
// c becomes the StoreMult value from cycle c+10 on; before that the previous
// product is returned.
package pairing_iss_pkg;
  import pairing_pkg::*;
  import gf2m_ref_pkg::*;

  // ---------------------------------------------------------------- assembler
  function automatic logic [5:0] opd(logic [1:0] bank, logic [3:0] regs);
    return {bank, regs};
  endfunction
  function automatic logic [15:0] i_add(logic [1:0] db, logic [3:0] dr, logic [1:0] sb, logic [3:0] sr);
    return {OP_ADD, opd(db, dr), opd(sb, sr)};
  endfunction
  function automatic logic [15:0] i_sqr(logic [1:0] db, logic [3:0] dr, logic [1:0] sb, logic [3:0] sr);
    return {OP_SQR, opd(db, dr), opd(sb, sr)};
  endfunction
  function automatic logic [15:0] i_sqrt(logic [1:0] db, logic [3:0] dr, logic [1:0] sb, logic [3:0] sr);
    return {OP_SQRT, opd(db, dr), opd(sb, sr)};
  endfunction
  // LoadMult(S2[], S1[]): S2 = F or Fs side, S1 = G or Gs side
  function automatic logic [15:0] i_ldm(logic [1:0] fb, logic [3:0] fr, logic [1:0] gb, logic [3:0] gr);
    return {OP_LOADMULT, opd(fb, fr), opd(gb, gr)};
  endfunction
  function automatic logic [15:0] i_stm(logic [1:0] db, logic [3:0] dr);
    return {OP_STOREMULT, opd(db, dr), 6'd0};
  endfunction
  function automatic logic [15:0] i_mov(logic [1:0] db, logic [1:0] sb);
    return {OP_MOVEBANK, opd(db, 4'd0), opd(sb, 4'd0)};
  endfunction
  function automatic logic [15:0] i_inc();
    return {OP_INCG0, 12'd0};
  endfunction
  function automatic logic [15:0] i_ctl(opcode_e op, int n);
    return {op, 12'(n)};
  endfunction

  // ---------------------------------------------------------------- model
  class pairing_iss;
    int    m;
    elem_t fpoly;
    elem_t f[4], g[4], h[4], i_[4], v[4], w[4];
    elem_t fs, gs;
    elem_t mul_out, mul_pend;
    int    mul_ready;
    int    ip;
    bit    wait_act, for_act, halted;
    int    wait_cnt, for_cnt;
    logic [MAXW-1:0] r;

    function new(int m_, int a_);
      m = m_;
      fpoly = trinomial(a_);
      for (int k = 0; k < 4; k++) begin
        f[k] = '0; g[k] = '0; h[k] = '0; i_[k] = '0; v[k] = '0; w[k] = '0;
      end
      fs = '0; gs = '0; mul_out = '0; mul_pend = '0; mul_ready = -1;
      ip = 0; wait_act = 0; for_act = 0; halted = 0; wait_cnt = 0; for_cnt = 0; r = '0;
    endfunction

    function void start(logic [MAXW-1:0] r_in);
      ip = 0; wait_act = 0; for_act = 0; halted = 0; r = r_in;
    endfunction

    function elem_t bsum(elem_t b[4], logic [3:0] re);
      elem_t s = '0;
      for (int k = 0; k < 4; k++) if (re[k]) s ^= b[k];
      return s;
    endfunction

    function elem_t src(logic [5:0] o);
      case (o[5:4])
        SRC_F:   return bsum(f, o[3:0]);
        SRC_G:   return bsum(g, o[3:0]);
        SRC_FS:  return fs;
        default: return gs;
      endcase
    endfunction

    // square root by m-1 squarings: sqrt(a) = a^(2^(m-1))
    function elem_t sqrt_ref(elem_t a);
      for (int k = 0; k < m - 1; k++) a = sqr(a, m, fpoly);
      return a;
    endfunction

    function void write(logic [5:0] o, elem_t val);
      for (int k = 0; k < 4; k++) if (o[k]) begin
        case (o[5:4])
          DST_G: g[k] = val;
          DST_V: v[k] = val;
          DST_W: w[k] = val;
          default: ;
        endcase
      end
      if (o[5:4] == DST_S && o[0]) fs = val;
      if (o[5:4] == DST_S && o[1]) gs = val;
    endfunction

    // datapath part of one instruction executed in clock cycle `cycle`
    function void exec(logic [15:0] word, int cycle);
      opcode_e op;
      logic [5:0] o2, o1;
      elem_t t[4];
      op = opcode_e'(word[15:12]);
      o2 = word[11:6];
      o1 = word[5:0];
      if (mul_ready >= 0 && cycle >= mul_ready) begin
        mul_out = mul_pend;
        mul_ready = -1;
      end
      case (op)
        OP_ADD:       write(o2, src(o1));
        OP_SQR:       write(o2, sqr(src(o1), m, fpoly));
        OP_SQRT:      write(o2, sqrt_ref(src(o1)));
        OP_LOADMULT: begin
          mul_pend  = mul(src(o2), src(o1), m, fpoly);
          mul_ready = cycle + 10;
        end
        OP_STOREMULT: write(o2, mul_out);
        OP_MOVEBANK: begin
          case (o2[5:4])
            MV_DST_F: begin t = (o1[5:4] == MV_SRC_H) ? h : v; f = t; end
            MV_DST_H: h = v;
            MV_DST_G: begin t = (o1[5:4] == MV_SRC_I) ? i_ : w; g = t; end
            default:  i_ = w;
          endcase
        end
        OP_INCG0:     g[0][0] = ~g[0][0];
        default: ;
      endcase
    endfunction

    // one clock of the whole processor: executes the word at ip, updates ip
    function void step(logic [15:0] word, int cycle);
      opcode_e op;
      int n, eff;
      op = opcode_e'(word[15:12]);
      n  = int'(word[11:0]);
      exec(word, cycle);
      case (op)
        OP_WAIT: begin
          eff = wait_act ? wait_cnt : n;
          if (eff == 0) begin wait_act = 0; ip = ip + 1; end
          else begin wait_act = 1; wait_cnt = eff - 1; end
        end
        OP_FOR: begin
          eff = for_act ? for_cnt : n;
          if (eff == 0) begin for_act = 0; ip = ip + 1; end
          else begin for_act = 1; for_cnt = eff - 1; ip = ip + 2; end
        end
        OP_JMP: begin
          if (n == ip) halted = 1;
          ip = n;
        end
        OP_JZ: begin
          ip = r[0] ? ip + 2 : ip + 1;
          r = r >> 1;
        end
        default: ip = ip + 1;
      endcase
    endfunction
  endclass

endpackage
