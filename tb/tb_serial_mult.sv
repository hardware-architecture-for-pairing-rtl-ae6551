// tb_serial_mult: the 9-cycle serial multiplier at GF(2^1223).
// Checks each product against the bit-serial reference, that done comes exactly
// nine clocks after the start clock with busy high in between, that the previous
// product stays on c while the next one is being computed, and that a start
// during a running multiplication restarts it with the new operands.
module tb_serial_mult;
  import gf2m_ref_pkg::*;

  localparam int M = 1223;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] a, b, c;
  logic         busy, done;
  elem_t        f;

  serial_mult dut (.clk, .rst_n, .start, .a, .b, .c, .busy, .done);

  always #5 clk = ~clk;

  task automatic chk(string tag, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", tag, $time); end
  endtask

  initial begin
    elem_t x, y, prev;
    int    lat;
    f = trinomial(255);
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 12; t++) begin
      x = rand_elem(M); y = rand_elem(M);
      if (t == 0) begin x = mask(M); y = mask(M); end
      @(negedge clk);
      a = M'(x); b = M'(y); start = 1;
      @(negedge clk);
      start = 0; a = M'(rand_elem(M)); b = '0;   // operands are not needed after start
      lat = 0;
      while (!done) begin
        chk("busy while computing", busy);
        chk("old result held", elem_t'(c) == prev);
        @(negedge clk);
        lat++;
      end
      chk("latency 9", lat == 9);
      chk("product", elem_t'(c) == mul(x, y, M, f));
      prev = elem_t'(c);
      @(negedge clk);
      chk("busy low after done", !busy && !done);
      chk("result stays", elem_t'(c) == prev);
    end
    // restart while busy: only the second product must appear
    x = rand_elem(M); y = rand_elem(M);
    @(negedge clk); a = M'(rand_elem(M)); b = M'(rand_elem(M)); start = 1;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    a = M'(x); b = M'(y); start = 1;
    @(negedge clk); start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    chk("restart latency", lat == 9);
    chk("restart product", elem_t'(c) == mul(x, y, M, f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
