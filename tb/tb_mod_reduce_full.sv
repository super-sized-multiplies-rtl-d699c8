// tb_mod_reduce_full: checks the 128 -> 64-bit reduction modulo 2^64 - 2^32 + 1 against the
// % operator, with a new input every clock and the result exactly 2 clocks later. Inputs are
// random 128-bit values, products of two residues, and corner values (all ones, multiples of
// p, values whose low half is smaller than the top 32 bits).
module tb_mod_reduce_full;
  import ntt_pkg::*;
  logic clk = 1'b0;
  logic [127:0] x;
  logic [63:0]  r;
  int checks = 0, failures = 0;
  logic [63:0] expq [$];

  mod_reduce_full dut (.clk, .x, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] pick(int i);
    logic [127:0] v;
    logic [63:0]  u, w;
    u = {$urandom, $urandom} % P;
    w = {$urandom, $urandom} % P;
    case (i % 8)
      0: v = '1;
      1: v = 128'(P) * 128'($urandom);
      2: v = {32'hFFFF_FFFF, 32'($urandom), 64'd3};
      3: v = 128'(P - 1) * 128'(P - 1);
      4: v = {$urandom, $urandom, $urandom, $urandom};
      default: v = 128'(u) * 128'(w);
    endcase
    return v;
  endfunction

  initial begin
    x = '0;
    for (int i = 0; i < 2; i++) begin @(negedge clk); expq.push_back(64'd0); end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (r !== expq.pop_front()) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: %h", i, r);
      end
      checks++;
      x = pick(i);
      expq.push_back(64'(x % 128'(P)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
