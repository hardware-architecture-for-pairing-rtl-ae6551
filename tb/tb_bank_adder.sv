// tb_bank_adder: all 16 read-enable patterns on random register contents; the
// expected sum is built with a separate XOR reduction per pattern.
module tb_bank_adder;
  localparam int M = 1223;
  int checks = 0, failures = 0;

  logic [3:0][M-1:0] regs;
  logic [3:0]        re;
  logic [M-1:0]      sum, exp;

  bank_adder dut (.regs(regs), .re(re), .sum(sum));

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int r = 0; r < 4; r++)
        for (int w = 0; w < M; w += 32) regs[r][w +: 32] = $urandom;
      for (int p = 0; p < 16; p++) begin
        re  = 4'(p);
        exp = (p[0] ? regs[0] : '0) ^ (p[1] ? regs[1] : '0) ^
              (p[2] ? regs[2] : '0) ^ (p[3] ? regs[3] : '0);
        #1;
        checks++;
        if (sum !== exp) begin
          failures++;
          $display("FAIL pattern %0d", p);
        end
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
