// tb_program_control: runs a small control-flow program through the program
// control with a behavioural synchronous program memory and compares the
// instruction-pointer trace, cycle by cycle, with a hand-worked trace:
// Wait(3) holding IP four cycles, For(3) giving exactly three iterations, Jz
// testing successive bits of R, Jmp, and a Jmp-to-self ending the program.
// The program is then started again to show that For is re-armed.
module tb_program_control;
  import pairing_pkg::*;

  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0, start = 0;
  logic [15:0]     r_in = 16'b010;
  logic [15:0]     prog [16];
  logic [15:0]     word;
  logic [IP_W-1:0] ip, ip_next;
  logic            run, done;

  program_control #(.RW(16)) dut (
    .clk, .rst_n, .start, .r_in, .instr(instr_t'(word)), .ip, .ip_next, .run, .done
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) word <= prog[ip_next];

  function automatic logic [15:0] ins(opcode_e op, int n);
    return {op, 12'(n)};
  endfunction

  int exp_trace [22] = '{0,1,1,1,1,2,4,5,6,7,2,4,6,7,2,4,5,6,7,2,3,8};

  task automatic run_once();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int k = 0; k < 22; k++) begin
      checks++;
      if (!run || ip != 12'(exp_trace[k])) begin
        failures++;
        $display("FAIL step %0d: ip=%0d run=%0b expected %0d", k, ip, run, exp_trace[k]);
      end
      @(negedge clk);
    end
    checks++;
    if (run || !done || ip != 12'd8) begin
      failures++;
      $display("FAIL end: run=%0b done=%0b ip=%0d", run, done, ip);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (run || !done || ip != 12'd8) failures++;
  endtask

  initial begin
    foreach (prog[i]) prog[i] = '0;
    prog[0] = ins(OP_ADD, 0);
    prog[1] = ins(OP_WAIT, 3);
    prog[2] = ins(OP_FOR, 3);
    prog[3] = ins(OP_JMP, 8);
    prog[4] = ins(OP_JZ, 0);
    prog[5] = ins(OP_ADD, 0);
    prog[6] = ins(OP_ADD, 0);
    prog[7] = ins(OP_JMP, 2);
    prog[8] = ins(OP_JMP, 8);
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (run || done) failures++;
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
