// delay_line: a chain of DEPTH registers, used to align the paths of the butterfly and the
// twiddle inputs of the engine. DEPTH = 0 is a plain wire. No reset: the data carried here
// is qualified by a separately reset valid bit.
module delay_line #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
    assign q = r[DEPTH-1];
  end
endmodule
