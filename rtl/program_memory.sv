// program_memory: instruction store of the cryptoprocessor, 4K words of 16 bits.
//
// A simple dual-port RAM: one write port through which a host loads the program
// while the processor is idle, and one synchronous read port addressed by the
// program control with the next instruction pointer, so that the word at IP is in
// rdata during the cycle in which IP holds that address. Memory contents are not
// reset.
module program_memory #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
