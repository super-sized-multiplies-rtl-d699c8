// tb_mul64_pipe: self-checking test of the 64x64 multiplier. Drives a new random operand
// pair every clock (plus corner values) and checks each product, exactly 6 clocks later,
// against the simulator's own 128-bit multiply.
module tb_mul64_pipe;
  logic clk = 1'b0;
  logic [63:0]  a, b;
  logic [127:0] p;
  int checks = 0, failures = 0;
  logic [127:0] expq [$];

  mul64_pipe dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 6; i++) begin @(negedge clk); expq.push_back(128'(a) * 128'(b)); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check the product of the pair presented 6 clocks ago
      if (p !== expq.pop_front()) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: %h", i, p);
      end
      checks++;
      case (i % 5)
        0: begin a = '1; b = '1; end
        1: begin a = {$urandom, $urandom}; b = 64'hFFFF_FFFF_0000_0001; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      expq.push_back(128'(a) * 128'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
