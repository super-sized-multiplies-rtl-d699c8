// fft8_engine: 8-point all-integer FFT engine built from 12 butterflies in three ranks.
//
// Rank l (0..2) pairs the ports whose numbers differ only in bit l; the lower port is the
// butterfly's top input and keeps the top output. With inputs in bit-reversed order this is
// three consecutive decimation-in-time radix-2 stages. Every butterfly has its own twiddle,
// so the engine serves any three consecutive stages of a longer transform: the twiddles
// tw[4*l + i] belong to butterfly i of rank l (butterflies numbered by the lower port with
// bit l removed). All twelve twiddles are presented together with the data; those of
// ranks 1 and 2 are delayed inside by 10 and 20 cycles. Latency 30 cycles, one group per
// clock. The twelve butterflies and the one-group-per-clock rate follow the original design; the
// rank wiring and twiddle numbering are this design's choice.
module fft8_engine
  import ntt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t din [8],
  input  word_t tw  [12],
  output logic  out_valid,
  output word_t dout [8]
);
  localparam int BF_LATENCY = 10;

  word_t stage [4][8];
  logic  sval  [4];
  word_t twd   [3][4];
  logic  bval  [3][4];

  assign stage[0] = din;
  assign sval[0]  = in_valid;

  for (genvar l = 0; l < 3; l++) begin : g_rank
    for (genvar i = 0; i < 4; i++) begin : g_bf
      // lower port: insert a 0 at bit l of i
      localparam int LO = ((i >> l) << (l + 1)) | (i & ((1 << l) - 1));
      localparam int HI = LO | (1 << l);
      delay_line #(.WIDTH(64), .DEPTH(l * BF_LATENCY)) u_twd (
        .clk, .d(tw[4*l + i]), .q(twd[l][i]));
      butterfly u_bf (
        .clk, .rst_n, .in_valid(sval[l]),
        .a(stage[l][LO]), .b(stage[l][HI]), .w(twd[l][i]),
        .out_valid(bval[l][i]), .x0(stage[l+1][LO]), .x1(stage[l+1][HI]));
    end
    assign sval[l+1] = bval[l][0];
  end

  assign dout      = stage[3];
  assign out_valid = sval[3];
endmodule
