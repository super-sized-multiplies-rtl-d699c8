// fft_controller: sequencer of one 4096-point transform on the two 8-point engines.
//
// A 4096-point radix-2 DIT transform (input in bit-reversed order) has 12 stages; each of
// the 4 passes runs 3 of them on the engines, stage 3q+l in rank l. In every pass each
// engine takes one 8-word group per clock for 256 clocks (256 words per engine input per
// pass, 2 engines x 8 inputs x 256 = 4096). Element n lives before pass q at
// ntt_pkg::loc_of(q, n) = (side E, slot T, port J), in bank 8E+J at address {half, T};
// pass q reads half q%2 and writes the other, so the result of pass 3 lands in half 0,
// where the input was loaded.
//
// Per issued group (engine e, slot t) the controller drives the common read address
// {q%2, t} of the 16 engine-side banks and the twelve twiddle exponents of each engine
// (w^k for the forward, w^(N-k) for the inverse transform). RAM and ROM both answer one
// clock later, when eng_valid is high. A copy of (pass, t) travels PIPE_LAT = 31 clocks to
// meet the engine outputs, where the controller names the bank and address of each of the
// 16 results (wb_*). The maps are chosen so that once output port m is delayed by m clocks
// (done in the top) no bank is written twice in a clock. Between passes the controller
// waits DRAIN clocks for the last writes. done pulses for one clock at the end.
// With len512 the run stops after pass 2: the first nine stages of the bit-reversed-input
// transform are eight independent 512-point transforms (one per value of index bits 11:9),
// the column transforms of a 512 x 4096 four-step split. Their results stay in half 1 at
// ntt_pkg::loc_of(3, n).
// The original design gives the group rate and the 256 words per input per pass; the maps, the
// write skew, the drain and the start/done handshake are this design's own.
module fft_controller
  import ntt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        inverse,
  input  logic        len512,
  output logic        busy,
  output logic        done,
  // read side (to banks and twiddle ROMs)
  output logic [8:0]  rd_addr,
  output logic [11:0] tw_addr [2][NTW],
  output logic        eng_valid,
  // destination of each engine output, aligned with the engine outputs (lane = 8*e + m)
  output logic        wb_valid [NBANK],
  output logic [3:0]  wb_bank  [NBANK],
  output logic [8:0]  wb_addr  [NBANK]
);
  localparam int PIPE_LAT = 31;   // 1 (RAM/ROM read) + 30 (engine)
  localparam int DRAIN    = 40;   // PIPE_LAT + 7 (write skew) + margin

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t      state;
  logic [1:0]  pass;
  logic [7:0]  slot;
  logic [5:0]  dcnt;
  logic        inv_r;
  logic        short_r;
  logic        issue;

  assign issue = (state == S_RUN);
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pass  <= '0;
      slot  <= '0;
      dcnt  <= '0;
      inv_r <= 1'b0;
      short_r <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          pass  <= '0;
          slot  <= '0;
          inv_r <= inverse;
          short_r <= len512;
        end
        S_RUN: begin
          slot <= slot + 8'd1;
          if (slot == 8'hFF) begin
            state <= S_DRAIN;
            dcnt  <= 6'(DRAIN - 1);
          end
        end
        default: begin   // S_DRAIN
          dcnt <= dcnt - 6'd1;
          if (dcnt == '0) begin
            if (pass == (short_r ? 2'd2 : 2'd3)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
              pass  <= pass + 2'd1;
              slot  <= '0;
            end
          end
        end
      endcase
    end
  end

  // ---- read side ----
  assign rd_addr = {pass[0], slot};

  always_comb begin
    for (int e = 0; e < 2; e++) begin
      for (int l = 0; l < 3; l++) begin
        for (int i = 0; i < 4; i++) begin
          loc_t        lc;
          logic [11:0] n, ex;
          lc.e = e[0];
          lc.t = slot;
          lc.j = 3'(((i >> l) << (l + 1)) | (i & ((1 << l) - 1)));   // top port of the butterfly
          n    = idx_of(int'(pass), lc);
          ex   = tw_exp(3 * int'(pass) + l, n);
          tw_addr[e][4*l + i] = inv_r ? (12'd0 - ex) : ex;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) eng_valid <= 1'b0;
    else        eng_valid <= issue;
  end

  // ---- write side: tag pipeline aligned with the engine outputs ----
  typedef struct packed {
    logic       v;
    logic [1:0] q;
    logic [7:0] t;
  } tag_t;

  tag_t tag_in, tag_out;
  logic tv_pipe [PIPE_LAT];

  assign tag_in = '{v: issue, q: pass, t: slot};

  delay_line #(.WIDTH($bits(tag_t) - 1), .DEPTH(PIPE_LAT)) u_tag (
    .clk, .d({tag_in.q, tag_in.t}), .q({tag_out.q, tag_out.t}));

  // the valid bit of the tag is reset
  always_ff @(posedge clk) begin
    if (!rst_n) for (int i = 0; i < PIPE_LAT; i++) tv_pipe[i] <= 1'b0;
    else begin
      tv_pipe[0] <= tag_in.v;
      for (int i = 1; i < PIPE_LAT; i++) tv_pipe[i] <= tv_pipe[i-1];
    end
  end
  assign tag_out.v = tv_pipe[PIPE_LAT-1];

  always_comb begin
    for (int e = 0; e < 2; e++) begin
      for (int m = 0; m < 8; m++) begin
        loc_t        src, dst;
        logic [11:0] n;
        src.e = e[0];
        src.t = tag_out.t;
        src.j = 3'(m);
        n     = idx_of(int'(tag_out.q), src);
        dst   = loc_of(int'(tag_out.q) + 1, n);
        wb_valid[8*e + m] = tag_out.v;
        wb_bank [8*e + m] = {dst.e, dst.j};
        wb_addr [8*e + m] = {~tag_out.q[0], dst.t};
      end
    end
  end
endmodule
