// twiddle_rom: table of twiddle factors w^k mod p, k = 0..N-1, w a primitive N-th root of
// unity (w = 7^((p-1)/N); 7 generates the multiplicative group mod p = 2^64 - 2^32 + 1).
//
// The contents are computed at elaboration time, w^k = w^(k-1) * w, so no data file is
// needed. NPORTS independent read ports, each with a registered output (1-cycle latency),
// one per butterfly of an 8-point engine. Keeping N entries (rather than N/2) lets the
// inverse transform read w^(N-k) = w^-k. The original design only names the ROM; its size, port
// count and generator are this design's choice.
module twiddle_rom
  import ntt_pkg::*;
#(
  parameter int N      = 4096,
  parameter int NPORTS = 12,
  localparam int AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr [NPORTS],
  output word_t         data [NPORTS]
);
  typedef word_t table_t [N];

  function automatic table_t make_table();
    table_t t;
    word_t  w = root_of_unity(N);
    t[0] = 64'd1;
    for (int k = 1; k < N; k++) t[k] = mulmod(t[k-1], w);
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    for (int i = 0; i < NPORTS; i++) data[i] <= TABLE[addr[i]];
  end
endmodule
