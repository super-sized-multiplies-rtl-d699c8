// mod_reduce_full: 128-bit to 64-bit full reduction modulo p = 2^64 - 2^32 + 1, 2-cycle latency.
//
// Write x = x3*2^96 + x2*2^64 + lo (x3, x2 32 bits, lo 64 bits). Since 2^64 = 2^32 - 1 and
// 2^96 = -1 (mod p), x = lo - x3 + x2*(2^32 - 1) (mod p). Stage 1 registers
// d = lo - x3 (adding p back on a borrow, so d < 2^64 and d = lo - x3 mod p) and
// m = x2*2^32 - x2 (< p). Stage 2 adds them, folds a carry out of bit 63 with 2^32 - 1,
// and subtracts p once if needed, so r < p. Only additions and subtractions, as the
// document requires of the modulus; the split into two stages matches the 2-cycle latency
// of the original design, the exact cut is this design's choice. Fully pipelined.
module mod_reduce_full
  import ntt_pkg::*;
(
  input  logic         clk,
  input  logic [127:0] x,
  output logic [63:0]  r
);
  logic [63:0] d_r, m_r;
  logic [64:0] dif;
  logic [64:0] s;
  logic [63:0] f;

  always_comb begin
    dif = {1'b0, x[63:0]} - {33'b0, x[127:96]};
  end

  always_ff @(posedge clk) begin
    d_r <= dif[64] ? (dif[63:0] - EPS) : dif[63:0];       // borrow: +2^64 -> +p means -EPS
    m_r <= {x[95:64], 32'b0} - {32'b0, x[95:64]};
  end

  always_comb begin
    s = {1'b0, d_r} + {1'b0, m_r};
    f = s[64] ? (s[63:0] + EPS) : s[63:0];                // 2^64 = EPS (mod p), no overflow as m_r < p
  end

  always_ff @(posedge clk) begin
    r <= (f >= P) ? (f - P) : f;
  end
endmodule
