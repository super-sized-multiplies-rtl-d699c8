// ntt4096_top: 4096-point all-integer FFT (number-theoretic transform) modulo
// p = 2^64 - 2^32 + 1, the transform engine of a large-integer squaring accelerator.
//
// Two 8-point engines (12 butterflies each) compute a 4096-point transform in 4 passes of
// 256 clocks. Each of the 16 engine inputs has its own 512-word Reorder RAM; the engine
// outputs return to those RAMs through sixteen 16-to-1 multiplexers (write_crossbar),
// after a per-port write skew. Each engine has a twiddle ROM. The 16 Reorder RAMs exist
// twice (cache sets 0 and 1): while the engines work on one set, the other set is on the
// memory side, where the previous results are read and the next input is written. 'swap'
// exchanges the sets.
//
// Memory-side port (stands in for the DDR SDRAM link, which is not part of this RTL):
//   ld_we/ld_idx/ld_data write input element x[ld_idx] (natural order) into the memory-side
//   set; rd_idx reads result X[rd_idx] (natural order) from it, rd_data one clock later.
//   Results share storage with inputs (half 0 of each RAM): read an index before writing it.
//   len512 selects the short mode: eight independent 512-point transforms, sequence b in
//   indices 512*b .. 512*b+511 (input and result alike); results are then kept in half 1.
//   The controller samples len512 at 'start'; the memory-side port uses its current value.
// Control: 'swap' (ignored while busy) exchanges the sets; 'start' (with 'inverse') runs a
// transform on the engine-side set; 'done' pulses at the end; a transform takes
// 4 x (256 + 40) clocks (3 x (256 + 40) in the 512-point mode).
// Forward: X[k] = sum_n x[n] w^(nk); inverse: the same with w^-1, without the 1/N scale.
// Outputs are congruent mod p and below 2^64 but may be >= p.
// The engines, RAM sizes, ROMs, multiplexers and cache duplication follow the original design; the
// memory-side port, the control handshake and the data placement are this design's own.
module ntt4096_top
  import ntt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        swap,
  input  logic        start,
  input  logic        inverse,
  input  logic        len512,
  output logic        busy,
  output logic        done,
  output logic        eng_set,
  input  logic        ld_we,
  input  logic [11:0] ld_idx,
  input  word_t       ld_data,
  input  logic [11:0] rd_idx,
  output word_t       rd_data
);
  // ---- controller ----
  logic        eng_valid;
  logic [8:0]  rd_addr;
  logic [11:0] tw_addr [2][NTW];
  logic        wb_valid [NBANK];
  logic [3:0]  wb_bank  [NBANK];
  logic [8:0]  wb_addr  [NBANK];

  fft_controller u_ctrl (
    .clk, .rst_n, .start, .inverse, .len512, .busy, .done,
    .rd_addr, .tw_addr, .eng_valid, .wb_valid, .wb_bank, .wb_addr);

  always_ff @(posedge clk) begin
    if (!rst_n)             eng_set <= 1'b0;
    else if (swap && !busy) eng_set <= ~eng_set;
  end

  // ---- cache sets ----
  logic  ram_we    [2][NBANK];
  logic [8:0] ram_waddr [2][NBANK];
  word_t ram_wdata [2][NBANK];
  logic [8:0] ram_raddr [2][NBANK];
  word_t ram_rdata [2][NBANK];

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar b = 0; b < NBANK; b++) begin : g_bank
      reorder_ram #(.DEPTH(512), .WIDTH(64)) u_ram (
        .clk, .we(ram_we[s][b]), .waddr(ram_waddr[s][b]), .wdata(ram_wdata[s][b]),
        .raddr(ram_raddr[s][b]), .rdata(ram_rdata[s][b]));
    end
  end

  // ---- engines and twiddle ROMs ----
  word_t eng_din  [2][8];
  word_t eng_dout [2][8];
  word_t tw_data  [2][NTW];
  logic  eng_ovalid [2];

  for (genvar e = 0; e < 2; e++) begin : g_eng
    twiddle_rom #(.N(NPTS), .NPORTS(NTW)) u_rom (.clk, .addr(tw_addr[e]), .data(tw_data[e]));
    for (genvar j = 0; j < 8; j++) begin : g_in
      assign eng_din[e][j] = eng_set ? ram_rdata[1][8*e + j] : ram_rdata[0][8*e + j];
    end
    fft8_engine u_eng (
      .clk, .rst_n, .in_valid(eng_valid), .din(eng_din[e]), .tw(tw_data[e]),
      .out_valid(eng_ovalid[e]), .dout(eng_dout[e]));
  end

  // ---- write skew and 16-1 multiplexers ----
  word_t      res_data [NBANK];
  logic       sk_valid [NBANK];
  logic [3:0] sk_bank  [NBANK];
  logic [8:0] sk_addr  [NBANK];
  word_t      sk_data  [NBANK];
  logic       xb_we    [NBANK];
  logic [8:0] xb_addr  [NBANK];
  word_t      xb_data  [NBANK];

  for (genvar k = 0; k < NBANK; k++) begin : g_res
    assign res_data[k] = eng_dout[k / 8][k % 8];
  end

  write_skew u_skew (
    .clk, .rst_n, .in_valid(wb_valid), .in_bank(wb_bank), .in_addr(wb_addr), .in_data(res_data),
    .out_valid(sk_valid), .out_bank(sk_bank), .out_addr(sk_addr), .out_data(sk_data));

  write_crossbar #(.NSRC(NBANK), .NBANK(NBANK), .AW(9), .DW(64)) u_xbar (
    .clk, .src_valid(sk_valid), .src_bank(sk_bank), .src_addr(sk_addr), .src_data(sk_data),
    .bank_we(xb_we), .bank_addr(xb_addr), .bank_data(xb_data));

  // ---- memory side: element placement ----
  loc_t       ld_loc, rd_loc;
  logic [3:0] rd_bank_r;

  logic       side_half;   // half holding the results of the selected transform length

  always_comb begin
    if (len512) begin
      ld_loc    = loc_of(0, {ld_idx[11:9], bitrev9(ld_idx[8:0])});
      rd_loc    = loc_of(3, rd_idx);
      side_half = 1'b1;
    end else begin
      ld_loc    = loc_of(0, bitrev12(ld_idx));
      rd_loc    = loc_of(4, rd_idx);
      side_half = 1'b0;
    end
  end

  always_ff @(posedge clk) rd_bank_r <= {rd_loc.e, rd_loc.j};

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      for (int b = 0; b < NBANK; b++) begin
        if (s == int'(eng_set)) begin
          ram_we[s][b]    = xb_we[b];
          ram_waddr[s][b] = xb_addr[b];
          ram_wdata[s][b] = xb_data[b];
          ram_raddr[s][b] = rd_addr;
        end else begin
          ram_we[s][b]    = ld_we && (int'({ld_loc.e, ld_loc.j}) == b);
          ram_waddr[s][b] = {1'b0, ld_loc.t};
          ram_wdata[s][b] = ld_data;
          ram_raddr[s][b] = {side_half, rd_loc.t};
        end
      end
    end
  end

  // the memory-side set is the one the engines do not use; eng_set cannot change between
  // a read and its data because swap is a deliberate host action
  assign rd_data = eng_set ? ram_rdata[0][rd_bank_r] : ram_rdata[1][rd_bank_r];

  // the engines' own valid bits must agree with the controller's tag pipeline
  a_tag_align: assert property (@(posedge clk) disable iff (!rst_n)
                                eng_ovalid[0] == wb_valid[0] && eng_ovalid[1] == wb_valid[8])
    else $error("ntt4096_top: engine results and write tags out of step");

  // swapping while a result is still being written back would lose it
  a_no_swap_busy: assert property (@(posedge clk) disable iff (!rst_n) swap |-> !busy)
    else $error("ntt4096_top: swap requested while busy");
endmodule
