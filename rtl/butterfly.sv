// butterfly: all-integer radix-2 decimation-in-time butterfly modulo p = 2^64 - 2^32 + 1.
//
//   x0 = a + w*b  (mod p)        x1 = a - w*b  (mod p)
//
// Structure (as drawn in the original design): the bottom input b is multiplied by the twiddle w
// (6-cycle 64x64 multiplier) and fully reduced (2 cycles). The reduced product r < p goes
// two ways: through a 1-cycle register to the top adder, and through a 1-cycle
// "p - r" stage to the bottom adder, so that the bottom adder also only adds. The top input
// a waits in a 9-cycle delay line. Each adder's 65-bit sum is folded to 64 bits by a
// 1-cycle partial reduction, so the outputs are congruent mod p and < 2^64 but may be >= p.
// Latency 10 cycles, one butterfly per clock. The valid bit that travels with the data,
// and its synchronous active-low reset, are this design's own addition.
module butterfly
  import ntt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t a,
  input  word_t b,
  input  word_t w,
  output logic  out_valid,
  output word_t x0,
  output word_t x1
);
  localparam int LATENCY   = 10;
  localparam int TOP_DELAY = 9;

  logic [127:0] prod;
  word_t        red;        // w*b mod p, < p
  word_t        red_d;      // 1-cycle delay to the top adder
  word_t        neg_r;      // p - red, in (0, p]
  word_t        a_d;
  logic [64:0]  sum_top, sum_bot;
  logic [LATENCY-1:0] vpipe;

  mul64_pipe      u_mul (.clk, .a(b), .b(w), .p(prod));
  mod_reduce_full u_red (.clk, .x(prod), .r(red));

  delay_line #(.WIDTH(64), .DEPTH(TOP_DELAY)) u_topdly (.clk, .d(a), .q(a_d));

  always_ff @(posedge clk) begin
    red_d <= red;
    neg_r <= P - red;
  end

  always_comb begin
    sum_top = {1'b0, a_d} + {1'b0, red_d};
    sum_bot = {1'b0, a_d} + {1'b0, neg_r};
  end

  mod_reduce_partial u_pr_top (.clk, .x(sum_top), .r(x0));
  mod_reduce_partial u_pr_bot (.clk, .x(sum_bot), .r(x1));

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];
endmodule
