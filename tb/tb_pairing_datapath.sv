// tb_pairing_datapath: drives the datapath with a long random stream of legal
// arithmetic, multiplier and bank-move instructions (with idle cycles and
// external loads of bank F mixed in) and compares banks G, V and W after every
// clock with the instruction-level reference model. Runs at the design's field,
// GF(2^1223). Also checks mult_busy for the nine cycles after each LoadMult.
module tb_pairing_datapath;
  import pairing_pkg::*;
  import gf2m_ref_pkg::*;
  import pairing_iss_pkg::*;

  localparam int M = 1223;
  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0, exec = 0;
  logic [15:0]       word = '0;
  logic [3:0]        ld_en = '0;
  logic [3:0][M-1:0] ld_data;
  logic [3:0][M-1:0] bank_g, bank_v, bank_w;
  logic              mult_busy;

  pairing_datapath dut (
    .clk, .rst_n, .exec, .instr(instr_t'(word)), .ld_en, .ld_data,
    .bank_g, .bank_v, .bank_w, .mult_busy
  );

  always #5 clk = ~clk;

  pairing_iss iss;
  int n_op [16];

  function automatic logic [15:0] rand_instr();
    int k = $urandom_range(0, 99);
    logic [3:0] rr = 4'($urandom_range(1, 15));
    logic [3:0] dr = 4'($urandom_range(1, 15));
    logic [1:0] sb = 2'($urandom_range(0, 3));
    logic [1:0] db = 2'($urandom_range(0, 3));
    if (db == DST_S) dr = {2'b00, 2'($urandom_range(1, 3))};
    if (k < 30) return i_add(db, dr, sb, rr);
    if (k < 45) return i_sqr(db, dr, sb, rr);
    if (k < 48) return i_sqrt(db, dr, sb, rr);
    if (k < 62) return i_ldm($urandom_range(0, 1) ? SRC_F : SRC_FS, rr,
                             $urandom_range(0, 1) ? SRC_G : SRC_GS, 4'($urandom_range(1, 15)));
    if (k < 78) return i_stm(db, dr);
    if (k < 90) begin
      case ($urandom_range(0, 5))
        0: return i_mov(MV_DST_F, MV_SRC_V);
        1: return i_mov(MV_DST_H, MV_SRC_V);
        2: return i_mov(MV_DST_F, MV_SRC_H);
        3: return i_mov(MV_DST_G, MV_SRC_W);
        4: return i_mov(MV_DST_I, MV_SRC_W);
        default: return i_mov(MV_DST_G, MV_SRC_I);
      endcase
    end
    return i_inc();
  endfunction

  initial begin
    int cycle, last_load;
    iss = new(M, 255);
    ld_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load bank F with four random elements
    @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      ld_data[r] = M'(rand_elem(M));
      iss.f[r] = elem_t'(ld_data[r]);
    end
    ld_en = 4'hF;
    @(negedge clk);
    ld_en = '0;
    cycle = 0;
    last_load = -100;
    for (int t = 0; t < 300; t++) begin
      // occasionally reload one F register while idle
      if ($urandom_range(0, 19) == 0) begin
        int r = $urandom_range(0, 3);
        exec = 0;
        ld_en = 4'(1 << r);
        ld_data[r] = M'(rand_elem(M));
        iss.f[r] = elem_t'(ld_data[r]);
      end else begin
        exec = 1;
        word = rand_instr();
        iss.exec(word, cycle);
        n_op[word[15:12]]++;
        if (word[15:12] == OP_LOADMULT) last_load = cycle;
      end
      @(negedge clk);
      ld_en = '0;
      cycle++;
      for (int r = 0; r < 4; r++) begin
        checks += 3;
        if (elem_t'(bank_g[r]) !== iss.g[r]) begin failures++; $display("FAIL G%0d at step %0d op %0d", r, t, word[15:12]); end
        if (elem_t'(bank_v[r]) !== iss.v[r]) begin failures++; $display("FAIL V%0d at step %0d", r, t); end
        if (elem_t'(bank_w[r]) !== iss.w[r]) begin failures++; $display("FAIL W%0d at step %0d", r, t); end
      end
      checks++;
      if (mult_busy !== (cycle - last_load <= 9)) begin
        failures++;
        $display("FAIL mult_busy at step %0d", t);
      end
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (n_op[k] == 0) begin failures++; $display("FAIL opcode %0d never issued", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
