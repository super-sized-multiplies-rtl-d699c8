// ntt_pkg: shared constants, types and functions of the 4096-point all-integer FFT.
//
// All arithmetic is modulo the prime p = 2^64 - 2^32 + 1, whose multiplicative group has
// order 2^32 * (2^32 - 1), so it holds roots of unity of every power-of-two order up to 2^32.
// The functions below are used to build constant tables at elaboration time (twiddle ROM)
// and by the bank/address maps of the controller. The per-pass maps are this design's own
// choice: they place element n of the transform into (engine side E, slot T, port J) so
// that a pass can stream one radix-8 group per engine per cycle and write its results for
// the next pass without two results hitting the same bank in one cycle.
package ntt_pkg;

  localparam logic [63:0] P        = 64'hFFFF_FFFF_0000_0001;
  localparam logic [63:0] EPS      = 64'h0000_0000_FFFF_FFFF;   // 2^64 mod p
  localparam int          NPTS     = 4096;                      // transform length
  localparam int          NBANK    = 16;                        // Reorder RAMs per cache set
  localparam int          NTW      = 12;                        // butterflies per engine

  typedef logic [63:0] word_t;

  // Location of an element in a cache set.
  typedef struct packed {
    logic       e;   // engine side (bank = 8*e + j)
    logic [7:0] t;   // slot within a 256-word half
    logic [2:0] j;   // engine input / bank within the side
  } loc_t;

  // Reference modular multiply (used for constant tables; not a datapath).
  function automatic word_t mulmod(word_t a, word_t b);
    logic [127:0] prod;
    prod = 128'(a) * 128'(b);
    return word_t'(prod % 128'(P));
  endfunction

  function automatic word_t powmod(word_t base, logic [63:0] ex);
    word_t r = 64'd1;
    word_t b = base;
    for (int i = 0; i < 64; i++) begin
      if (ex[i]) r = mulmod(r, b);
      b = mulmod(b, b);
    end
    return r;
  endfunction

  // Primitive n-th root of unity, n a power of two: 7^((p-1)/n).
  function automatic word_t root_of_unity(int unsigned n);
    return powmod(64'd7, (P - 64'd1) / 64'(n));
  endfunction

  function automatic logic [11:0] bitrev12(logic [11:0] k);
    logic [11:0] r;
    for (int i = 0; i < 12; i++) r[i] = k[11-i];
    return r;
  endfunction

  function automatic logic [8:0] bitrev9(logic [8:0] k);
    logic [8:0] r;
    for (int i = 0; i < 9; i++) r[i] = k[8-i];
    return r;
  endfunction

  // Where element n (index in the bit-reversed-input DIT transform) is stored before pass q.
  // q = 4 is the final (natural output order) placement.
  function automatic loc_t loc_of(int unsigned q, logic [11:0] n);
    loc_t l;
    case (q)
      0: begin l.j = n[2:0];  l.e = n[11];         l.t = {n[10:6], n[5:3]};          end
      1: begin l.j = n[5:3];  l.e = n[11];         l.t = {n[10:9], n[2:0], n[8:6]};  end
      2: begin l.j = n[8:6];  l.e = n[0] ^ n[11];  l.t = {n[5:1], n[11:9]};          end
      3: begin l.j = n[11:9]; l.e = n[0];          l.t = {n[8:4], n[3:1]};           end
      default: begin l.j = n[3:1]; l.e = n[0];     l.t = n[11:4];                    end
    endcase
    return l;
  endfunction

  // Inverse of loc_of.
  function automatic logic [11:0] idx_of(int unsigned q, loc_t l);
    logic [11:0] n;
    case (q)
      0: n = {l.e, l.t[7:3], l.t[2:0], l.j};
      1: n = {l.e, l.t[7:6], l.t[2:0], l.j, l.t[5:3]};
      2: begin
           n = {l.t[2:0], l.j, l.t[7:3], 1'b0};
           n[0] = l.e ^ n[11];
         end
      3: n = {l.j, l.t[7:3], l.t[2:0], l.e};
      default: n = {l.t, l.j, l.e};
    endcase
    return n;
  endfunction

  // Twiddle exponent (out of NPTS) of the butterfly of global radix-2 stage s whose top
  // element has index n: w_N^((n mod 2^s) * 2^(11-s)).
  function automatic logic [11:0] tw_exp(int unsigned s, logic [11:0] n);
    logic [11:0] m;
    m = n & 12'((1 << s) - 1);
    return 12'(m << (11 - s));
  endfunction

endpackage
