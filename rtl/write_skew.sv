// write_skew: delays lane m of each engine's results (data and destination tag) by m clocks.
//
// Within a pass, the eight results of one group all belong in the same engine input of the
// next pass, i.e. the same bank. Consecutive groups of an engine target consecutive banks,
// so delaying output port m by m clocks spreads the eight results of a group over eight
// clocks, and in any clock the eight lanes of an engine hold results of eight different
// groups, bound for eight different banks. Lane index = 8*engine + port. This stage is
// this design's own; the original design does not describe how bank conflicts are avoided.
module write_skew
  import ntt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid [NBANK],
  input  logic [3:0] in_bank  [NBANK],
  input  logic [8:0] in_addr  [NBANK],
  input  word_t      in_data  [NBANK],
  output logic       out_valid [NBANK],
  output logic [3:0] out_bank  [NBANK],
  output logic [8:0] out_addr  [NBANK],
  output word_t      out_data  [NBANK]
);
  for (genvar k = 0; k < NBANK; k++) begin : g_lane
    localparam int D = k % 8;
    delay_line #(.WIDTH(4 + 9 + 64), .DEPTH(D)) u_dly (
      .clk, .d({in_bank[k], in_addr[k], in_data[k]}),
      .q({out_bank[k], out_addr[k], out_data[k]}));
    if (D == 0) begin : g_v0
      assign out_valid[k] = in_valid[k];
    end else begin : g_vd
      logic [D-1:0] v;
      always_ff @(posedge clk) begin
        if (!rst_n) v <= '0;
        else begin
          v[0] <= in_valid[k];
          for (int i = 1; i < D; i++) v[i] <= v[i-1];
        end
      end
      assign out_valid[k] = v[D-1];
    end
  end
endmodule
