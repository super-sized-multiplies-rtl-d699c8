// tb_butterfly: checks x0 = a + w*b and x1 = a - w*b (mod p) for random operands, one
// butterfly per clock, results exactly 10 clocks later, including the valid bit. Inputs a
// and b range over all 64-bit values, as they do inside a transform where stage outputs are
// only partially reduced. Also counts how often the sums needed the 65 -> 64-bit fold.
module tb_butterfly;
  import ntt_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  word_t a, b, w, x0, x1;
  int checks = 0, failures = 0, folds = 0;
  typedef struct { logic v; logic [63:0] e0, e1; } exp_t;
  exp_t expq [$];

  butterfly dut (.clk, .rst_n, .in_valid, .a, .b, .w, .out_valid, .x0, .x1);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t ref_bf(logic v, word_t aa, word_t bb, word_t ww);
    exp_t e;
    logic [127:0] t;
    t    = (128'(bb) * 128'(ww)) % 128'(P);
    e.v  = v;
    e.e0 = 64'((128'(aa) + t) % 128'(P));
    e.e1 = 64'((128'(aa) + 128'(P) - t) % 128'(P));
    return e;
  endfunction

  always @(posedge clk) if (dut.sum_top[64] || dut.sum_bot[64]) folds++;

  initial begin
    exp_t e;
    a = '0; b = '0; w = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin @(negedge clk); expq.push_back(ref_bf(1'b0, a, b, w)); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      e = expq.pop_front();
      if (out_valid !== e.v) failures++;
      if (e.v && ((64'(128'(x0) % 128'(P)) != e.e0) || (64'(128'(x1) % 128'(P)) != e.e1))) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: %h %h exp %h %h", i, x0, x1, e.e0, e.e1);
      end
      checks++;
      in_valid = (i % 7) != 3;
      a = {$urandom, $urandom};
      b = (i % 11 == 0) ? 64'd0 : {$urandom, $urandom};
      w = (i % 13 == 0) ? P - 1 : {$urandom, $urandom} % P;
      if (i % 17 == 0) a = '1;
      expq.push_back(ref_bf(in_valid, a, b, w));
    end
    if (folds == 0) failures++;
    $display("folds=%0d", folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
