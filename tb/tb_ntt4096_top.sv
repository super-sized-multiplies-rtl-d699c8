// tb_ntt4096_top: end-to-end test of the 4096-point transform accelerator at its default
// size. Sequence: load x into the memory-side set; swap; forward transform of x while y is
// loaded into the other set; swap; forward transform of y while X = NTT(x) is read out,
// spot-checked against a direct DFT and written back as the next input; swap; inverse
// transform of X while Y is read and spot-checked; swap; read the inverse result and check
// all 4096 words equal N * x mod p; then run the 512-point mode on eight sequences at once
// and spot-check each against a direct 512-point DFT. Checks the run time of every transform, and counts the
// mechanisms the design relies on: forward and inverse runs, cache swaps, memory-side
// writes overlapping a transform, results routed across engine sides by the 16-1
// multiplexers, and sums folded by the partial reduction (watched in one butterfly).
module tb_ntt4096_top;
  import ntt_pkg::*;
  localparam int N = 4096;
  localparam int T_RUN = 4 * (256 + 40) + 1;

  logic  clk = 1'b0, rst_n = 1'b0, swap = 1'b0, start = 1'b0, inverse = 1'b0, len512 = 1'b0;
  logic  busy, done, eng_set, ld_we = 1'b0;
  logic [11:0] ld_idx = '0, rd_idx = '0;
  word_t ld_data = '0, rd_data;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_short = 0, n_swap = 0, n_overlap = 0, n_cross = 0, n_fold = 0;
  int cyc = 0, t_start = 0, t_expect = T_RUN;

  typedef word_t vec_t [N];
  vec_t  x, y, z, big_x, big_y, res;
  word_t wtab [N];

  ntt4096_top dut (.clk, .rst_n, .swap, .start, .inverse, .len512, .busy, .done, .eng_set,
                   .ld_we, .ld_idx, .ld_data, .rd_idx, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (ld_we && busy) n_overlap++;
    for (int k = 0; k < NBANK; k++)
      if (dut.sk_valid[k] && (dut.sk_bank[k][3] != k[3])) n_cross++;
    if (dut.g_eng[0].u_eng.g_rank[0].g_bf[0].u_bf.sum_bot[64]) n_fold++;
    if (start) t_start = cyc;
    if (done) begin
      checks++;
      if (cyc - t_start != t_expect) begin
        failures++;
        $display("transform took %0d clocks, expected %0d", cyc - t_start, t_expect);
      end
    end
  end

  function automatic word_t dft_at(input vec_t v, input int k, input bit inv);
    logic [127:0] acc = 0;
    for (int n = 0; n < N; n++) begin
      int e = (n * k) % N;
      if (inv) e = (N - e) % N;
      acc = (acc + 128'(mulmod(v[n], wtab[e]))) % 128'(P);
    end
    return word_t'(acc);
  endfunction

  task automatic load(input vec_t v);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_idx = 12'(k); ld_data = v[k];
    end
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  task automatic read_all();
    for (int k = 0; k <= N; k++) begin
      @(negedge clk);
      if (k > 0) begin
        res[k-1] = rd_data;
      end
      if (k < N) rd_idx = 12'(k);
    end
  endtask

  task automatic do_swap();
    @(negedge clk); swap = 1'b1;
    @(negedge clk); swap = 1'b0;
    n_swap++;
  endtask

  task automatic kick(bit inv);
    @(negedge clk); start = 1'b1; inverse = inv;
    @(negedge clk); start = 1'b0; inverse = 1'b0;
    if (inv) n_inv++; else n_fwd++;
  endtask

  task automatic wait_done();
    while (busy) @(negedge clk);
  endtask

  task automatic spot_check(input vec_t v, input vec_t got, input bit inv, input string tag);
    for (int i = 0; i < 24; i++) begin
      int k;
      word_t expv;
      k = (i < 4) ? i : (i < 8 ? N - 1 - i : int'($urandom_range(0, N - 1)));
      expv = dft_at(v, k, inv);
      checks++;
      if (64'(128'(got[k]) % 128'(P)) != expv) begin
        failures++;
        if (failures < 8) $display("%s: X[%0d] = %h, expected %h", tag, k, got[k], expv);
      end
    end
  endtask

  initial begin
    wtab[0] = 64'd1;
    for (int i = 1; i < N; i++) wtab[i] = mulmod(wtab[i-1], root_of_unity(N));
    for (int n = 0; n < N; n++) begin
      x[n] = (n == 5) ? P - 1 : ({$urandom, $urandom} % P);
      y[n] = (n < 16) ? 64'(n + 1) : ((n % 3 == 0) ? {$urandom, $urandom} % P : 64'd0);
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    load(x);                       // into set 1 (engines own set 0 after reset)
    do_swap();                     // engines: x
    kick(1'b0);
    load(y);                       // overlaps the transform of x
    wait_done();
    do_swap();                     // engines: y, memory side: X
    kick(1'b0);
    read_all();
    big_x = res;
    spot_check(x, big_x, 1'b0, "NTT(x)");
    load(big_x);                   // X becomes the input of the inverse
    wait_done();
    do_swap();                     // engines: X, memory side: Y
    kick(1'b1);
    read_all();
    big_y = res;
    spot_check(y, big_y, 1'b0, "NTT(y)");
    wait_done();
    do_swap();                     // memory side: INTT(X)
    read_all();
    for (int n = 0; n < N; n++) begin
      checks++;
      if (64'(128'(res[n]) % 128'(P)) != mulmod(x[n], 64'(N))) begin
        failures++;
        if (failures < 8) $display("INTT(NTT(x))[%0d] = %h, expected %h", n, res[n], mulmod(x[n], 64'(N)));
      end
    end

    // 512-point mode: eight independent transforms, sequence b at indices 512*b + k
    for (int n = 0; n < N; n++) z[n] = (n % 512 < 3) ? 64'(n / 512 + 1) : ({$urandom, $urandom} % P);
    len512 = 1'b1;
    load(z);
    do_swap();
    t_expect = 3 * (256 + 40) + 1;
    kick(1'b0);
    n_short++;
    wait_done();
    do_swap();
    read_all();
    for (int i = 0; i < 32; i++) begin
      int b, m;
      logic [127:0] acc;
      b = i % 8;
      m = (i < 8) ? 0 : (i < 16 ? 511 : int'($urandom_range(0, 511)));
      acc = 0;
      for (int k = 0; k < 512; k++)
        acc = (acc + 128'(mulmod(z[512*b + k], wtab[8 * ((k * m) % 512)]))) % 128'(P);
      checks++;
      if (64'(128'(res[512*b + m]) % 128'(P)) != 64'(acc)) begin
        failures++;
        if (failures < 8) $display("NTT512 block %0d [%0d] = %h, expected %h", b, m, res[512*b + m], 64'(acc));
      end
    end
    len512 = 1'b0;

    $display("mechanisms: forward=%0d inverse=%0d len512=%0d swaps=%0d overlapped_loads=%0d cross_side_writes=%0d partial_reduction_folds=%0d",
             n_fwd, n_inv, n_short, n_swap, n_overlap, n_cross, n_fold);
    if (n_fwd == 0 || n_inv == 0 || n_short == 0 || n_swap == 0 || n_overlap == 0 || n_cross == 0 || n_fold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
