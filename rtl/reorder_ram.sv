// reorder_ram: one Reorder RAM, a simple dual-port memory of DEPTH x WIDTH bits.
//
// One write port and one read port on a common clock; the read is registered (data one
// cycle after the address). A read and a write of the same address in one cycle return
// the old contents. In the accelerator the two 256-word halves are used ping-pong: one
// half feeds the current pass while the other receives its results. The 512-word depth and
// dual-port organisation follow the original design; latency and collision behaviour are this
// design's choice.
module reorder_ram #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 64,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
