// bank_adder: the 4-input GF(2^m) adder at the output of a register bank.
//
// Every Addition, Squaring, SquareRoot and LoadMult first adds (bitwise XOR) any
// subset of the four registers of a source bank. Each register has a read enable;
// a disabled register contributes zero (the 2-input gate at the register output),
// so one enable moves a register, none gives zero. Purely combinational, three
// XOR gates deep.
module bank_adder #(
  parameter int unsigned M = 1223
) (
  input  logic [3:0][M-1:0] regs,
  input  logic [3:0]        re,
  output logic [M-1:0]      sum
);

  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++)
      if (re[i]) sum = sum ^ regs[i];
  end

endmodule
