// tb_mod_reduce_partial: checks the 65 -> 64-bit partial reduction. For sums a + c with
// a < 2^64 and c <= p (the butterfly's operating range) the output, one clock later, must be
// congruent to the sum modulo p, and equal to it when the sum has no bit 64.
module tb_mod_reduce_partial;
  import ntt_pkg::*;
  logic clk = 1'b0;
  logic [64:0] x;
  logic [63:0] r;
  int checks = 0, failures = 0, folds = 0;
  logic [64:0] xq [$];

  mod_reduce_partial dut (.clk, .x, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, c;
    logic [64:0] xo;
    x = '0;
    @(negedge clk); xq.push_back(x);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      xo = xq.pop_front();
      if ((128'(r) % 128'(P)) != (128'(xo) % 128'(P)) || (!xo[64] && r != xo[63:0])) begin
        failures++;
        if (failures < 5) $display("mismatch: x=%h r=%h", xo, r);
      end
      checks++;
      if (xo[64]) folds++;
      case (i % 4)
        0: begin a = '1; c = P; end
        1: begin a = {$urandom, $urandom}; c = P - ({$urandom, $urandom} % P); end
        default: begin a = {$urandom, $urandom}; c = {$urandom, $urandom} % P; end
      endcase
      x = {1'b0, a} + {1'b0, c};
      xq.push_back(x);
    end
    if (folds == 0) failures++;
    $display("folds=%0d", folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
