// mul64_pipe: unsigned 64 x 64 -> 128-bit multiplier with a 6-cycle pipeline.
//
// The twiddle-factor multiplier of the butterfly. As on the FPGA it was mapped to, the
// product is formed from sixteen 16 x 16-bit partial products (one per hard multiplier)
// and summed in a short adder tree. Pipeline (one register each): input operands,
// 16 partial products, 4 row sums (a_i * b), 2 pair sums, final sum, output. The 6-cycle
// latency and the 16 partial products follow the original design; the limb split and the cut
// points of the pipeline are this design's choice. Fully pipelined: one product per clock,
// p = a*b appears LATENCY clocks after a, b are presented.
module mul64_pipe (
  input  logic         clk,
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] p
);
  logic [63:0]  a_r, b_r;
  logic [31:0]  pp   [4][4];   // pp[i][k] = a limb i * b limb k
  logic [79:0]  row  [4];      // a limb i * b
  logic [127:0] pair [2];
  logic [127:0] sum_r;

  always_ff @(posedge clk) begin
    a_r <= a;
    b_r <= b;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 4; k++)
        pp[i][k] <= a_r[16*i +: 16] * b_r[16*k +: 16];
    for (int i = 0; i < 4; i++)
      row[i] <= 80'(pp[i][0]) + (80'(pp[i][1]) << 16) + (80'(pp[i][2]) << 32) + (80'(pp[i][3]) << 48);
    pair[0] <= 128'(row[0]) + (128'(row[1]) << 16);
    pair[1] <= (128'(row[2]) << 32) + (128'(row[3]) << 48);
    sum_r   <= pair[0] + pair[1];
    p       <= sum_r;
  end
endmodule
