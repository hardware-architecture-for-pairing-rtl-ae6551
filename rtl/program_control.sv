// program_control: instruction pointer and the control instructions Jmp, For, Wait
// and Jz.
//
// A 12-bit instruction pointer (IP) addresses up to 4K instructions. Normally IP
// advances by one each clock. The next IP is computed combinationally from the
// current instruction and drives the synchronous program memory, so the word at
// IP is always the one being executed (no fetch bubbles, no delay slots).
//  * Jmp(n):  IP <= n. A Jmp to its own address ends the program: run drops and
//             done rises until the next start.
//  * Wait(n): IP is held for n extra cycles, so Wait(n) occupies n+1 cycles.
//  * For(n):  loop of exactly n iterations. The first time For is reached its
//             12-bit counter is loaded with n. While iterations remain, the counter
//             is decremented and IP += 2 (entering the loop body); when none remain,
//             IP += 1 (normally onto a Jmp past the body) and the loop is re-armed.
//  * Jz(n):   tests bit 0 of register R: 0 gives IP += 1, 1 gives IP += 2. R is
//             then shifted right by one so that successive Jz test successive bits.
// start (one cycle) sets IP to 0, loads R from r_in and starts execution; run stays
// high while the program executes, and the datapath executes an instruction only
// while run is high.
module program_control
  import pairing_pkg::*;
#(
  parameter int unsigned RW = 1223
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [RW-1:0]   r_in,
  input  instr_t          instr,     // word at ip, from program memory
  output logic [IP_W-1:0] ip,
  output logic [IP_W-1:0] ip_next,   // read address for program memory
  output logic            run,
  output logic            done
);

  logic [IP_W-1:0] n;
  logic [IP_W-1:0] wait_cnt, for_cnt, wait_eff, for_eff;
  logic            wait_act, for_act;
  logic [RW-1:0]   r_q;
  logic            halt;

  assign n        = imm12(instr);
  assign wait_eff = wait_act ? wait_cnt : n;
  assign for_eff  = for_act  ? for_cnt  : n;
  assign halt     = run && instr.cmd == OP_JMP && n == ip;

  always_comb begin
    ip_next = ip;
    if (start) begin
      ip_next = '0;
    end else if (run) begin
      unique case (instr.cmd)
        OP_WAIT: ip_next = (wait_eff == '0) ? ip + IP_W'(1) : ip;
        OP_FOR:  ip_next = (for_eff  == '0) ? ip + IP_W'(1) : ip + IP_W'(2);
        OP_JMP:  ip_next = n;
        OP_JZ:   ip_next = r_q[0] ? ip + IP_W'(2) : ip + IP_W'(1);
        default: ip_next = ip + IP_W'(1);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip       <= '0;
      run      <= 1'b0;
      done     <= 1'b0;
      wait_act <= 1'b0;
      wait_cnt <= '0;
      for_act  <= 1'b0;
      for_cnt  <= '0;
      r_q      <= '0;
    end else begin
      ip <= ip_next;
      if (start) begin
        run      <= 1'b1;
        done     <= 1'b0;
        wait_act <= 1'b0;
        for_act  <= 1'b0;
        r_q      <= r_in;
      end else if (run) begin
        if (halt) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        if (instr.cmd == OP_WAIT) begin
          wait_act <= (wait_eff != '0);
          wait_cnt <= wait_eff - 1'b1;
        end
        if (instr.cmd == OP_FOR) begin
          for_act <= (for_eff != '0);
          for_cnt <= for_eff - 1'b1;
        end
        if (instr.cmd == OP_JZ) r_q <= r_q >> 1;
      end
    end
  end

endmodule
