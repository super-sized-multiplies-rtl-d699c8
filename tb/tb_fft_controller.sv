// tb_fft_controller: runs the controller through a forward and an inverse transform with a
// behavioural model of the 16 Reorder RAMs that stores element indices instead of data.
// For every issued group it checks that the 8 words each engine reads form one radix-8
// group of the current pass (indices equal outside the pass's three bits, port j holding
// the element whose three bits are j), that every element is read exactly once per pass,
// and that each twiddle exponent is (n mod 2^s) * 2^(11-s) for the top element n of the
// butterfly of stage s (negated for the inverse). Results are written back by the tags,
// with port m delayed m clocks as in the top; no bank may be written twice in one clock,
// tags must follow the engine inputs by 30 clocks, and at the end every element must sit
// at its natural-order output place. The run time is checked against 4 x (256 + 40) clocks,
// and 3 x (256 + 40) for a third run in the 512-point mode, which must stop after pass 2.
module tb_fft_controller;
  import ntt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, inverse = 1'b0, len512 = 1'b0;
  logic busy, done, eng_valid;
  logic [8:0]  rd_addr;
  logic [11:0] tw_addr [2][NTW];
  logic        wb_valid [NBANK];
  logic [3:0]  wb_bank  [NBANK];
  logic [8:0]  wb_addr  [NBANK];
  int checks = 0, failures = 0;

  fft_controller dut (.clk, .rst_n, .start, .inverse, .len512, .busy, .done,
                      .rd_addr, .tw_addr, .eng_valid, .wb_valid, .wb_bank, .wb_addr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] mem [2][16][256];   // element index held by half/bank/slot
  int          cyc = 0;
  int          groups = 0;
  bit          seen [4096];
  typedef struct { int c; logic [11:0] n [16]; } grp_t;
  grp_t        gq [$];
  // pending skewed writes: lane, due cycle, bank, addr, element
  typedef struct { int due; logic [3:0] bank; logic [8:0] addr; logic [11:0] n; } wr_t;
  wr_t         wq [$];
  logic [8:0]  rd_prev;
  logic [11:0] tw_prev [2][NTW];
  bit          inv_mode;

  function automatic int lo_port(int l, int i);
    return ((i >> l) << (l + 1)) | (i & ((1 << l) - 1));
  endfunction

  always @(negedge clk) begin
    cyc++;
    // ---- reads: eng_valid now means rd_prev was read one clock ago ----
    if (eng_valid) begin
      grp_t g;
      int   q;
      q = groups / 256;
      if (groups % 256 == 0) foreach (seen[i]) seen[i] = 1'b0;
      for (int e = 0; e < 2; e++) begin
        logic [11:0] base, msk;
        msk = 12'(7 << (3 * q));
        base = mem[rd_prev[8]][8*e][rd_prev[7:0]] & ~msk;
        for (int j = 0; j < 8; j++) begin
          logic [11:0] n;
          n = mem[rd_prev[8]][8*e + j][rd_prev[7:0]];
          g.n[8*e + j] = n;
          checks++;
          if ((n & ~msk) != base || int'((n >> (3 * q)) & 7) != j || seen[n]) begin
            failures++;
            if (failures < 5) $display("pass %0d bad group element %h at e%0d j%0d", q, n, e, j);
          end
          seen[n] = 1'b1;
        end
        for (int l = 0; l < 3; l++)
          for (int i = 0; i < 4; i++) begin
            logic [11:0] nt, ex;
            int s;
            s  = 3 * q + l;
            nt = g.n[8*e + lo_port(l, i)];
            ex = 12'((int'(nt) % (1 << s)) * (1 << (11 - s)));
            if (inv_mode) ex = 12'(4096 - int'(ex));
            checks++;
            if (tw_prev[e][4*l + i] != ex) begin
              failures++;
              if (failures < 5) $display("pass %0d twiddle e%0d %0d: %0d exp %0d", q, e, 4*l+i, tw_prev[e][4*l+i], ex);
            end
          end
      end
      g.c = cyc;
      gq.push_back(g);
      groups++;
    end
    rd_prev = rd_addr;
    tw_prev = tw_addr;
    // ---- write tags ----
    if (wb_valid[0]) begin
      grp_t g;
      g = gq.pop_front();
      checks++;
      if (cyc - g.c != 30) begin
        failures++;
        $display("tag latency %0d", cyc - g.c);
      end
      for (int k = 0; k < 16; k++) begin
        wr_t w;
        if (!wb_valid[k]) failures++;
        w.due = cyc + (k % 8); w.bank = wb_bank[k]; w.addr = wb_addr[k]; w.n = g.n[k];
        wq.push_back(w);
      end
    end
    // ---- apply writes due now; at most one per bank ----
    begin
      bit used [16];
      automatic wr_t keep [$] = {};
      foreach (used[i]) used[i] = 1'b0;
      foreach (wq[i]) begin
        if (wq[i].due == cyc) begin
          checks++;
          if (used[wq[i].bank]) begin
            failures++;
            if (failures < 5) $display("bank %0d written twice at %0d", wq[i].bank, cyc);
          end
          used[wq[i].bank] = 1'b1;
          mem[wq[i].addr[8]][wq[i].bank][wq[i].addr[7:0]] = wq[i].n;
        end else keep.push_back(wq[i]);
      end
      wq = keep;
    end
  end

  task automatic run(bit inv, bit short);
    int t0, t1;
    for (int n = 0; n < 4096; n++) begin
      loc_t l = loc_of(0, 12'(n));
      mem[0][{l.e, l.j}][l.t] = 12'(n);
    end
    groups = 0;
    inv_mode = inv;
    @(negedge clk);
    start = 1'b1; inverse = inv; len512 = short;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0; inverse = 1'b0; len512 = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    checks++;
    if (t1 - t0 != (short ? 3 : 4) * (256 + 40) + 1) begin
      failures++;
      $display("transform took %0d clocks", t1 - t0);
    end
    checks++;
    if (groups != (short ? 768 : 1024)) failures++;
    for (int k = 0; k < 4096; k++) begin
      loc_t l = loc_of(short ? 3 : 4, 12'(k));
      checks++;
      if (mem[short ? 1 : 0][{l.e, l.j}][l.t] != 12'(k)) begin
        failures++;
        if (failures < 5) $display("element %0d ends at wrong place", k);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, 1'b0);
    repeat (5) @(negedge clk);
    run(1'b1, 1'b0);
    repeat (5) @(negedge clk);
    run(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
