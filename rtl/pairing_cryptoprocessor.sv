// pairing_cryptoprocessor: programmable coprocessor for bilinear pairings over
// binary fields GF(2^m), top level.
//
// A 16-bit instruction set drives a datapath of GF(2^m) units (4-input bank adders,
// squarer, square root, 9-cycle serial Karatsuba multiplier) and six 4-register
// banks. Any pairing algorithm, curve, tower field or distortion map is a program.
// Usage: load the program through prog_we/prog_waddr/prog_wdata and the input point
// coordinates into bank F through ld_en/ld_data, pulse start (r_in is latched for
// Jz), wait for done, then read banks G, V and W. busy is high from start until the
// program ends (Jmp to its own address); mult_busy shows the multiplier working.
// Defaults: m = 1223, f(x) = x^1223 + x^255 + 1, KOA truncated after s = 4 levels,
// 4K-word program memory.
module pairing_cryptoprocessor
  import pairing_pkg::*;
#(
  parameter int unsigned M  = FIELD_M,
  parameter int unsigned A  = FIELD_A,
  parameter int unsigned S  = KOA_S,
  parameter int unsigned RW = FIELD_M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // program load
  input  logic                  prog_we,
  input  logic [IP_W-1:0]       prog_waddr,
  input  logic [INSTR_W-1:0]    prog_wdata,
  // operand load into bank F
  input  logic [3:0]            ld_en,
  input  logic [3:0][M-1:0]     ld_data,
  // control
  input  logic                  start,
  input  logic [RW-1:0]         r_in,
  output logic                  busy,
  output logic                  done,
  output logic                  mult_busy,
  output logic [IP_W-1:0]       ip,
  // results
  output logic [3:0][M-1:0]     bank_g,
  output logic [3:0][M-1:0]     bank_v,
  output logic [3:0][M-1:0]     bank_w
);

  logic [IP_W-1:0]    ip_next;
  logic [INSTR_W-1:0] rdata;
  instr_t             instr;
  logic               run;

  assign instr = instr_t'(rdata);
  assign busy  = run;

  program_memory #(.AW(IP_W), .DW(INSTR_W)) u_pmem (
    .clk, .we(prog_we), .waddr(prog_waddr), .wdata(prog_wdata),
    .raddr(ip_next), .rdata
  );

  program_control #(.RW(RW)) u_ctrl (
    .clk, .rst_n, .start, .r_in, .instr, .ip, .ip_next, .run, .done
  );

  pairing_datapath #(.M(M), .A(A), .S(S)) u_dp (
    .clk, .rst_n, .exec(run), .instr, .ld_en, .ld_data,
    .bank_g, .bank_v, .bank_w, .mult_busy
  );

endmodule
