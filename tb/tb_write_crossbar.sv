// tb_write_crossbar: each cycle, assigns random distinct destination banks to a random subset
// of the 16 sources and checks that every bank writes exactly the word and address of the
// source aimed at it, and that banks nobody aims at do not write.
module tb_write_crossbar;
  logic clk = 1'b0;
  logic       src_valid [16];
  logic [3:0] src_bank  [16];
  logic [8:0] src_addr  [16];
  logic [63:0] src_data [16];
  logic       bank_we   [16];
  logic [8:0] bank_addr [16];
  logic [63:0] bank_data [16];
  int checks = 0, failures = 0;

  write_crossbar dut (
    .clk, .src_valid, .src_bank, .src_addr, .src_data, .bank_we, .bank_addr, .bank_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [16];
    int owner [16];
    foreach (src_valid[s]) begin
      src_valid[s] = 1'b0; src_bank[s] = '0; src_addr[s] = '0; src_data[s] = '0;
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      foreach (perm[i]) perm[i] = i;
      for (int i = 15; i > 0; i--) begin
        automatic int j = $urandom_range(0, i);
        automatic int t = perm[i];
        perm[i] = perm[j]; perm[j] = t;
      end
      foreach (owner[k]) owner[k] = -1;
      for (int s = 0; s < 16; s++) begin
        src_valid[s] = (c % 4 == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        src_bank[s]  = 4'(perm[s]);
        src_addr[s]  = 9'($urandom);
        src_data[s]  = {$urandom, $urandom};
        if (src_valid[s]) owner[perm[s]] = s;
      end
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (owner[k] < 0) begin
          if (bank_we[k]) failures++;
        end else if (!bank_we[k] || bank_addr[k] != src_addr[owner[k]] ||
                     bank_data[k] != src_data[owner[k]]) begin
          failures++;
          if (failures < 5) $display("bank %0d wrong", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
