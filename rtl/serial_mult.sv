// serial_mult: serial-parallel Karatsuba-Ofman multiplier with integrated reduction,
// c = a * b mod f(x) in GF(2^m), one result every 9 clock cycles.
//
// Two Karatsuba levels are unrolled around a single fully parallel hybrid KOA core
// (fph_koa) of about m/4 bits:
//  * level 1 (KOA-LFSR split): a = aH*x^L1 + aL with L1 = ceil(m/2), giving the
//    three operands aL, aH, aL+aH (and likewise for b);
//  * level 2 (overlap-free split): each of those is split into even and odd
//    coefficients, giving e, o, e+o of Q = ceil(L1/2) bits.
// The nine operand pairs are captured in registers when start is pulsed. On the
// next nine clocks the core multiplies pair 0..8, one per clock; eight products are
// parked in registers and, on the ninth clock, all nine are copied into holding
// registers. The output is formed combinationally from the holding registers:
// overlap-free recombination into the three level-1 products, then the KOA-LFSR
// recombination c = (z2*x^(2*L1) mod f) + (z1*x^L1 mod f) + z0 using parallel LFSRs.
// The holding registers keep the previous result readable until the next result
// replaces it, so a new multiplication may be started before the last one is read.
//
// Timing: start at clock edge t captures the operands; busy is high for the next
// nine cycles; done pulses and c shows the new product in the cycle after edge t+9.
// A start while busy abandons the running product and begins the new one.
module serial_mult #(
  parameter int unsigned  M     = 1223,
  parameter logic [M-1:0] FPOLY = (M'(1) << 255) | M'(1),
  parameter int unsigned  S     = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c,
  output logic         busy,
  output logic         done
);

  localparam int unsigned L1 = (M + 1) / 2;     // level-1 half width (612)
  localparam int unsigned Q  = (L1 + 1) / 2;    // core operand width (306)
  localparam int unsigned PW = 2 * Q - 1;       // core product width (611)
  localparam int unsigned P1 = 2 * L1 - 1;      // level-1 product width (1223)

  typedef logic [Q-1:0]  part_t;
  typedef logic [PW-1:0] prod_t;

  // ---------------------------------------------------------------- operand split
  function automatic void split2(input logic [L1-1:0] x, output part_t e,
                                 output part_t o, output part_t m);
    e = '0; o = '0;
    for (int unsigned i = 0; i < L1; i++) begin
      if (i % 2 == 0) e[i/2] = x[i];
      else            o[i/2] = x[i];
    end
    m = e ^ o;
  endfunction

  part_t sa [9];
  part_t sb [9];

  always_comb begin
    logic [L1-1:0] xl, xh, yl, yh;
    xl = a[L1-1:0];  xh = L1'(a[M-1:L1]);
    yl = b[L1-1:0];  yh = L1'(b[M-1:L1]);
    // order: 0..2 = z0 (low halves), 3..5 = z2 (high halves), 6..8 = zm (sums)
    split2(xl,      sa[0], sa[1], sa[2]);
    split2(xh,      sa[3], sa[4], sa[5]);
    split2(xl ^ xh, sa[6], sa[7], sa[8]);
    split2(yl,      sb[0], sb[1], sb[2]);
    split2(yh,      sb[3], sb[4], sb[5]);
    split2(yl ^ yh, sb[6], sb[7], sb[8]);
  end

  // ---------------------------------------------------------------- serial core
  part_t      opa_q [9];
  part_t      opb_q [9];
  prod_t      part_q [8];
  prod_t      hold_q [9];
  logic [3:0] cnt_q;
  prod_t      core_p;

  fph_koa #(.N(Q), .S(S)) u_core (.a(opa_q[cnt_q]), .b(opb_q[cnt_q]), .c(core_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
      for (int i = 0; i < 9; i++) begin
        opa_q[i]  <= '0;
        opb_q[i]  <= '0;
        hold_q[i] <= '0;
      end
      for (int i = 0; i < 8; i++) part_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int i = 0; i < 9; i++) begin
          opa_q[i] <= sa[i];
          opb_q[i] <= sb[i];
        end
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (cnt_q == 4'd8) begin
          for (int i = 0; i < 8; i++) hold_q[i] <= part_q[i];
          hold_q[8] <= core_p;
          busy      <= 1'b0;
          done      <= 1'b1;
          cnt_q     <= '0;
        end else begin
          part_q[cnt_q[2:0]] <= core_p;
          cnt_q              <= cnt_q + 4'd1;
        end
      end
    end
  end

  // ---------------------------------------------------------------- recombination
  // overlap-free merge: p = pe(x^2) + x*(pm+pe+po)(x^2) + x^2*po(x^2)
  function automatic logic [P1-1:0] merge2(prod_t pe, prod_t po, prod_t pm);
    logic [P1-1:0] p;
    prod_t         mid;
    mid = pm ^ pe ^ po;
    p   = '0;
    for (int unsigned k = 0; k < PW; k++) begin
      p[2*k] = p[2*k] ^ pe[k];
      if (2*k+1 < P1) p[2*k+1] = p[2*k+1] ^ mid[k];
      if (2*k+2 < P1) p[2*k+2] = p[2*k+2] ^ po[k];
    end
    return p;
  endfunction

  logic [P1-1:0] z0, z2, zm, z1;
  logic [M-1:0]  z2_red, z1_red;

  assign z0 = merge2(hold_q[0], hold_q[1], hold_q[2]);
  assign z2 = merge2(hold_q[3], hold_q[4], hold_q[5]);
  assign zm = merge2(hold_q[6], hold_q[7], hold_q[8]);
  assign z1 = zm ^ z0 ^ z2;

  plfsr #(.M(M), .FPOLY(FPOLY), .D(2*L1)) u_red2 (.a(M'(z2)), .y(z2_red));
  plfsr #(.M(M), .FPOLY(FPOLY), .D(L1))   u_red1 (.a(M'(z1)), .y(z1_red));

  assign c = z2_red ^ z1_red ^ M'(z0);

endmodule
