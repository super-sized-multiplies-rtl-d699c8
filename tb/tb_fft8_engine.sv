// tb_fft8_engine: checks the 8-point engine two ways, with a new group every clock and the
// results exactly 30 clocks later. (1) Standard twiddles: with x given in bit-reversed port
// order, the outputs must be the 8-point DFT X[k] = sum_n x[n] w8^(nk) mod p, computed
// directly. (2) Random twiddles: the outputs must match a behavioural model of three ranks
// of butterflies, rank l pairing ports that differ in bit l.
module tb_fft8_engine;
  import ntt_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  word_t din [8], tw [12], dout [8];
  int checks = 0, failures = 0;
  typedef struct { logic v; word_t x [8]; } exp_t;
  exp_t expq [$];
  word_t w8;

  fft8_engine dut (.clk, .rst_n, .in_valid, .din, .tw, .out_valid, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lo_port(int l, int i);
    return ((i >> l) << (l + 1)) | (i & ((1 << l) - 1));
  endfunction

  function automatic int br3(int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  initial begin
    exp_t e;
    word_t xs [8];
    w8 = root_of_unity(8);
    foreach (din[j]) din[j] = '0;
    foreach (tw[j])  tw[j]  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); e.v = 1'b0; expq.push_back(e);
    end
    for (int g = 0; g < 1000; g++) begin
      @(negedge clk);
      e = expq.pop_front();
      if (out_valid !== e.v) failures++;
      if (e.v) for (int k = 0; k < 8; k++) begin
        checks++;
        if (64'(128'(dout[k]) % 128'(P)) != e.x[k]) begin
          failures++;
          if (failures < 5) $display("group %0d out %0d: %h exp %h", g, k, dout[k], e.x[k]);
        end
      end
      in_valid = (g % 9) != 4;
      for (int n = 0; n < 8; n++) xs[n] = (g % 5 == 0) ? P - 1 : {$urandom, $urandom} % P;
      e.v = in_valid;
      if (g % 2 == 0) begin
        // standard DIT twiddles, bit-reversed input, direct DFT reference
        for (int l = 0; l < 3; l++)
          for (int i = 0; i < 4; i++)
            tw[4*l + i] = powmod(w8, 64'((lo_port(l, i) % (1 << l)) << (2 - l)));
        for (int j = 0; j < 8; j++) din[j] = xs[br3(j)];
        for (int k = 0; k < 8; k++) begin
          automatic logic [127:0] acc = 0;
          for (int n = 0; n < 8; n++)
            acc = (acc + 128'(mulmod(xs[n], powmod(w8, 64'((n * k) % 8))))) % 128'(P);
          e.x[k] = 64'(acc);
        end
      end else begin
        // random twiddles, behavioural butterfly network
        word_t s [8];
        for (int j = 0; j < 12; j++) tw[j] = {$urandom, $urandom} % P;
        for (int j = 0; j < 8; j++) begin din[j] = xs[j]; s[j] = xs[j]; end
        for (int l = 0; l < 3; l++)
          for (int i = 0; i < 4; i++) begin
            int lo, hi;
            word_t t, u;
            lo = lo_port(l, i); hi = lo + (1 << l);
            t = mulmod(s[hi], tw[4*l + i]);
            u = s[lo];
            s[lo] = 64'((128'(u) + 128'(t)) % 128'(P));
            s[hi] = 64'((128'(u) + 128'(P) - 128'(t)) % 128'(P));
          end
        for (int k = 0; k < 8; k++) e.x[k] = s[k];
      end
      expq.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
