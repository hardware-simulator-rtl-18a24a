// Frequency-domain SISO channel with overlap-add: streams of any length.
//
// The input stream is cut into blocks of B = N/2 = 16 samples (16 is the
// smallest power of two above the 14-sample largest excess delay of TGn
// model B). Each block is extended with a tail of 16 zero samples, so the
// 32-point FFT of the block, multiplied bin by bin with the stored channel
// frequency response H[k] (the 32-point FFT of the zero-padded impulse
// response) and transformed back by the 32-point IFFT, gives the full
// linear convolution of the block, 16 + 15 - 1 samples, without wrap-round.
// The final adder adds the first 16 samples of the current result to the
// last 16 samples of the previous one (overlap-add), which removes the old
// limit of signals no longer than the FFT.
//
// Processing of one block on the shared fft_engine:
//   clear 1 + load 17 + FFT 80 + multiply 34 + IFFT 80 + overlap-add 32,
//   about 245 cycles, after up to 3 cycles of start-up.
// Blocks are collected in a ping-pong input buffer while the previous block
// is processed, and results leave a ping-pong output buffer one sample per
// x_valid, so y(t) = (h * x)(t - 2B): a fixed latency of 32 samples. The
// input sample period must therefore be at least 16 clock cycles (a clock
// of 16 times the sample rate); a faster stream raises overrun.
//
// What follows the architecture: block size 16, tail of 16 zeros, FFT/IFFT
// of 32 points, multiplication by a reloadable H held in a dual-port RAM,
// final overlap adder. This design's choice: the serial FFT engine and its
// throughput, the fixed-point formats (guard bits G, Q4.12 H), the
// ping-pong buffering and its latency.
//
// Profile: host words 0..31 are H[k] = {re, im} (Q4.12 each), word 32 is the
// header (low bits: truncation window). A profile takes effect at the next
// block start after swap. Until a profile has been made active H = 0.
module freq_siso
  import chsim_pkg::*;
#(
  parameter int unsigned LOG2N = 5,
  parameter int unsigned DW    = 32,
  parameter int unsigned G     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  sample_t                  x,
  // host profile write port and swap
  input  logic                     wr_en,
  input  logic [LOG2N:0]           wr_addr,
  input  logic [31:0]              wr_data,
  input  logic                     swap,
  // output stream
  output logic                     y_valid,
  output siso_t                    y,
  output logic [31:0]              y_hdr,
  output logic                     overrun,
  output logic                     blk_done
);

  localparam int unsigned N = 1 << LOG2N;
  localparam int unsigned B = N / 2;
  localparam int unsigned PW = DW + 16 + 1;

  // ---------------- profile RAM ----------------
  logic        active_bank, blk_bank, rd_loaded;
  logic [LOG2N-1:0] h_addr;
  logic [31:0] h_word, hdr_word;

  profile_dpram #(.DEPTH(N), .W(32)) u_prof (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data, .swap,
    .active_bank,
    .rd_bank  (blk_bank),
    .rd_addr  (h_addr),
    .rd_data  (h_word),
    .hdr_o    (hdr_word),
    .rd_loaded
  );

  // ---------------- FFT engine ----------------
  logic                 e_clear, e_wr, e_start, e_inv, e_busy, e_done;
  logic [LOG2N-1:0]     e_waddr, e_raddr;
  logic signed [DW-1:0] e_wre, e_wim, e_rre, e_rim;

  fft_engine #(.LOG2N(LOG2N), .DW(DW)) u_fft (
    .clk, .rst_n,
    .clear  (e_clear),
    .wr_en  (e_wr),
    .wr_addr(e_waddr),
    .wr_re  (e_wre),
    .wr_im  (e_wim),
    .rd_addr(e_raddr),
    .rd_re  (e_rre),
    .rd_im  (e_rim),
    .start  (e_start),
    .inverse(e_inv),
    .busy   (e_busy),
    .done   (e_done)
  );

  // ---------------- input / output ping-pong buffers ----------------
  sample_t               inbuf  [2][B];
  siso_t                 outbuf [2][B];
  logic [31:0]           outhdr [2];
  logic [$clog2(B)-1:0]  in_ptr;
  logic                  in_sel;
  logic                  req, req_sel, blk_sel;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_FFT, S_MUL, S_IFFT, S_OLA} state_t;
  state_t                state;
  logic [LOG2N:0]        cnt;
  logic signed [DW-1:0]  tail [B];

  logic new_blk;
  assign new_blk = x_valid && (32'(in_ptr) == B - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ptr  <= '0;
      in_sel  <= 1'b0;
      y_valid <= 1'b0;
      y       <= '0;
      y_hdr   <= '0;
      overrun <= 1'b0;
      req     <= 1'b0;
      req_sel <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < int'(B); i++) inbuf[b][i] <= '0;
    end else begin
      y_valid <= x_valid;
      overrun <= 1'b0;
      if (x_valid) begin
        inbuf[in_sel][in_ptr] <= x;
        y     <= outbuf[in_sel][in_ptr];
        y_hdr <= outhdr[in_sel];
        in_ptr <= in_ptr + 1'b1;
        if (new_blk) begin
          in_sel  <= ~in_sel;
          req_sel <= in_sel;
          req     <= 1'b1;
          overrun <= req || (state != S_IDLE);
        end
      end
      if (state == S_IDLE && req && !new_blk) req <= 1'b0;
    end
  end

  // ---------------- block processing ----------------
  // Complex product X * H, H in Q4.12, rounded.
  logic signed [15:0]   h_re, h_im;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [DW:0]   ola;
  logic signed [DW:0]   y_round;

  localparam logic signed [DW:0] YMAX = (DW+1)'((1 << (SISO_W - 1)) - 1);
  localparam logic signed [DW:0] YMIN = -(DW+1)'(1 << (SISO_W - 1));

  function automatic logic [LOG2N-1:0] bitrev(logic [LOG2N-1:0] v);
    for (int i = 0; i < int'(LOG2N); i++) bitrev[i] = v[LOG2N-1-i];
  endfunction

  always_comb begin
    h_re = rd_loaded ? h_word[31:16] : '0;
    h_im = rd_loaded ? h_word[15:0]  : '0;
    p_re = PW'(e_rre) * PW'(h_re) - PW'(e_rim) * PW'(h_im);
    p_im = PW'(e_rre) * PW'(h_im) + PW'(e_rim) * PW'(h_re);
    ola  = (DW+1)'(e_rre) + (DW+1)'(tail[cnt[LOG2N-2:0]]);
    y_round = (ola + (DW+1)'(1 << (G - 1))) >>> G;
  end

  always_comb begin
    e_clear = 1'b0;
    e_wr    = 1'b0;
    e_waddr = '0;
    e_wre   = '0;
    e_wim   = '0;
    e_raddr = '0;
    e_start = 1'b0;
    e_inv   = 1'b0;
    h_addr  = '0;
    case (state)
      S_IDLE: e_clear = req;
      S_LOAD: begin
        e_wr    = (32'(cnt) < B);
        e_waddr = cnt[LOG2N-1:0];
        e_wre   = DW'(inbuf[blk_sel][cnt[LOG2N-2:0]]) <<< G;
        e_start = (32'(cnt) == B);
      end
      S_FFT: e_inv = 1'b0;
      S_MUL: begin
        // engine entry m holds X[bitrev(m)]: fetch H[bitrev(m)] one cycle ahead
        h_addr  = bitrev(cnt[LOG2N-1:0]);
        e_raddr = cnt[LOG2N-1:0] - 1'b1;
        e_waddr = cnt[LOG2N-1:0] - 1'b1;
        e_wr    = (cnt != 0) && (32'(cnt) <= N);
        e_wre   = DW'((p_re + PW'(1 << (H_FRAC - 1))) >>> H_FRAC);
        e_wim   = DW'((p_im + PW'(1 << (H_FRAC - 1))) >>> H_FRAC);
        e_start = (32'(cnt) == N + 1);
        e_inv   = 1'b1;
      end
      S_IFFT: e_inv = 1'b1;
      S_OLA:  e_raddr = cnt[LOG2N-1:0];
      default: ;
    endcase
  end

  // The engine is only started while idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) e_start |-> !e_busy)
    else $error("FFT engine started while busy");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      blk_sel  <= 1'b0;
      blk_bank <= 1'b0;
      blk_done <= 1'b0;
      for (int i = 0; i < int'(B); i++) tail[i] <= '0;
      for (int b = 0; b < 2; b++) begin
        outhdr[b] <= '0;
        for (int i = 0; i < int'(B); i++) outbuf[b][i] <= '0;
      end
    end else begin
      blk_done <= 1'b0;
      case (state)
        S_IDLE: if (req) begin
          state    <= S_LOAD;
          cnt      <= '0;
          blk_sel  <= req_sel;
          blk_bank <= active_bank;
        end
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == B) state <= S_FFT;
        end
        S_FFT: if (e_done) begin
          state <= S_MUL;
          cnt   <= '0;
        end
        S_MUL: begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == N + 1) state <= S_IFFT;
        end
        S_IFFT: if (e_done) begin
          state <= S_OLA;
          cnt   <= '0;
        end
        S_OLA: begin
          cnt <= cnt + 1'b1;
          if (cnt[LOG2N-1] == 1'b0) begin
            if (y_round > YMAX)      outbuf[blk_sel][cnt[LOG2N-2:0]] <= YMAX[SISO_W-1:0];
            else if (y_round < YMIN) outbuf[blk_sel][cnt[LOG2N-2:0]] <= YMIN[SISO_W-1:0];
            else                     outbuf[blk_sel][cnt[LOG2N-2:0]] <= y_round[SISO_W-1:0];
          end else begin
            tail[cnt[LOG2N-2:0]] <= e_rre;
          end
          if (32'(cnt) == N - 1) begin
            state    <= S_IDLE;
            blk_done <= 1'b1;
            outhdr[blk_sel] <= hdr_word;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
