// tb_twiddle_rom: reads random exponents on all 12 ports every clock and checks each word,
// one clock later, against w^k computed by square-and-multiply, where w is checked to be a
// primitive 4096-th root of unity (w^2048 = p - 1).
module tb_twiddle_rom;
  import ntt_pkg::*;
  localparam int N = 4096;
  logic clk = 1'b0;
  logic [11:0] addr [12];
  word_t data [12];
  int checks = 0, failures = 0;
  word_t w;

  twiddle_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = powmod(64'd7, (P - 1) / N);
    checks++;
    if (powmod(w, 64'(N / 2)) != P - 1) failures++;
    foreach (addr[i]) addr[i] = 12'(i);
    @(negedge clk);
    for (int c = 0; c < 500; c++) begin
      foreach (addr[i]) addr[i] = (c % 10 == 0) ? 12'(N - 1 - i) : 12'($urandom);
      @(negedge clk);
      // data now holds the words of the addresses presented one clock before 'addr' changed
      foreach (data[i]) begin
        checks++;
        if (data[i] != powmod(w, 64'(addr[i]))) begin
          failures++;
          if (failures < 5) $display("port %0d k=%0d: %h", i, addr[i], data[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
