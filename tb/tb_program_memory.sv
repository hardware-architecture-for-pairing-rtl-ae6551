// tb_program_memory: writes random words to random addresses, then reads them
// back through the synchronous read port (one clock of read latency).
module tb_program_memory;
  int checks = 0, failures = 0;

  logic        clk = 0, we = 0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [4096];
  logic [11:0] addrs [64];

  program_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 12'(i * 64 + $urandom_range(0, 63));
      @(negedge clk);
      we = 1; waddr = addrs[i]; wdata = 16'($urandom);
      model[addrs[i]] = wdata;
    end
    @(negedge clk); we = 0;
    // the top and bottom word too
    @(negedge clk); we = 1; waddr = 12'hFFF; wdata = 16'hBEEF; model[12'hFFF] = 16'hBEEF;
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = addrs[i];
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addrs[i]]) begin failures++; $display("FAIL addr %h", addrs[i]); end
    end
    raddr = 12'hFFF; @(posedge clk); #1;
    checks++;
    if (rdata !== 16'hBEEF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
