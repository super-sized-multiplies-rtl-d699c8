// tb_reorder_ram: writes and reads a 512-word Reorder RAM against a shadow array. Each clock
// does a random write and a random read; read data must appear exactly one clock after its
// address, and a read of the address written in the same clock must return the old word.
module tb_reorder_ram;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [63:0] shadow [512];
  logic [63:0] expd;
  logic        expv;
  int checks = 0, failures = 0, collisions = 0;

  reorder_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    expv = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      if (expv) begin
        checks++;
        if (rdata !== expd) begin
          failures++;
          if (failures < 5) $display("read mismatch %h exp %h", rdata, expd);
        end
      end
      we    = $urandom_range(0, 1) == 1;
      waddr = 9'($urandom);
      wdata = {$urandom, $urandom};
      raddr = (c % 8 == 0) ? waddr : 9'($urandom);
      if (we && raddr == waddr) collisions++;
      expd  = shadow[raddr];             // old contents
      expv  = 1'b1;
      if (we) shadow[waddr] = wdata;
    end
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
