// write_crossbar: the sixteen 16-to-1 multiplexers in front of the Reorder RAM write ports.
//
// Each of the NSRC sources (engine outputs) carries a valid bit, a destination bank and a
// word address. Bank k writes the data of the source whose valid destination is k; the
// select of each 16-to-1 multiplexer is thus decoded from the destination tags. The
// schedule guarantees that no two valid sources name the same bank in one cycle; an
// assertion checks it. Purely combinational. The mux count and size follow the original design;
// tag-based selection is this design's choice.
module write_crossbar #(
  parameter int NSRC  = 16,
  parameter int NBANK = 16,
  parameter int AW    = 9,
  parameter int DW    = 64,
  localparam int BW   = $clog2(NBANK)
) (
  input  logic          clk,
  input  logic          src_valid [NSRC],
  input  logic [BW-1:0] src_bank  [NSRC],
  input  logic [AW-1:0] src_addr  [NSRC],
  input  logic [DW-1:0] src_data  [NSRC],
  output logic          bank_we   [NBANK],
  output logic [AW-1:0] bank_addr [NBANK],
  output logic [DW-1:0] bank_data [NBANK]
);
  logic [NSRC-1:0] hit [NBANK];

  always_comb begin
    for (int k = 0; k < NBANK; k++) begin
      bank_we[k]   = 1'b0;
      bank_addr[k] = '0;
      bank_data[k] = '0;
      for (int s = 0; s < NSRC; s++) begin
        hit[k][s] = src_valid[s] && (int'(src_bank[s]) == k);
        if (hit[k][s]) begin
          bank_we[k]   = 1'b1;
          bank_addr[k] = src_addr[s];
          bank_data[k] = src_data[s];
        end
      end
    end
  end

  for (genvar k = 0; k < NBANK; k++) begin : g_chk
    a_one_writer: assert property (@(posedge clk) $onehot0(hit[k]))
      else $error("write_crossbar: two sources write bank %0d in one cycle", k);
  end
endmodule
