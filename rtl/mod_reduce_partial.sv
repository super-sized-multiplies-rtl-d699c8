// mod_reduce_partial: 65-bit to 64-bit partial reduction modulo p = 2^64 - 2^32 + 1, 1 cycle.
//
// Used at both outputs of the butterfly. A set bit 64 is worth 2^64 = 2^32 - 1 (mod p), so
// the output register takes x[63:0] + (2^32 - 1) in that case and x[63:0] otherwise. The
// result is congruent to x but only guaranteed < 2^64, not < p ("partial" reduction). It
// cannot overflow provided x <= 2^64 - 1 + p, which holds in the butterfly because one
// addend of each sum is at most p. Registered output, one result per clock.
module mod_reduce_partial
  import ntt_pkg::*;
(
  input  logic        clk,
  input  logic [64:0] x,
  output logic [63:0] r
);
  always_ff @(posedge clk) begin
    r <= x[64] ? (x[63:0] + EPS) : x[63:0];
  end
endmodule
