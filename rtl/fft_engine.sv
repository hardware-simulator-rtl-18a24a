// In-place radix-2 FFT / IFFT engine of the frequency-domain SISO channel.
//
// Holds one frame of N = 2^LOG2N complex samples (N = 32: a block of 16
// input samples extended with a tail of 16 zeros) in a register array and
// computes one radix-2 butterfly per clock cycle, N/2 * LOG2N cycles per
// transform (80 for N = 32).
//   forward (inverse = 0): decimation in frequency, natural-order input,
//     bit-reversed output, each stage scaled by 1/2 so the result is
//     X[k]/N and cannot overflow.
//   inverse (inverse = 1): decimation in time with conjugate twiddles,
//     bit-reversed input, natural-order output, unscaled. Forward then
//     inverse therefore gives exactly the circular convolution, and the
//     bit-reversed spectrum never needs reordering.
// Twiddles exp(-j*2*pi*k/N) are computed at elaboration in Q1.14.
//
// The FFT and IFFT of size 32 follow the architecture; the vendor FFT core
// it was built with is replaced by this serial engine, and the scaling
// scheme and word width DW are this design's choice.
//
// Interface: clear zeroes the frame in one cycle; wr_* writes one entry;
// rd_addr reads one entry combinationally. start (while not busy) begins a
// transform; done pulses in the cycle after the last butterfly is written.
// Writes and clear are ignored while busy.
module fft_engine
  import chsim_pkg::*;
#(
  parameter int unsigned LOG2N = 5,
  parameter int unsigned DW    = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 wr_en,
  input  logic [LOG2N-1:0]     wr_addr,
  input  logic signed [DW-1:0] wr_re,
  input  logic signed [DW-1:0] wr_im,
  input  logic [LOG2N-1:0]     rd_addr,
  output logic signed [DW-1:0] rd_re,
  output logic signed [DW-1:0] rd_im,
  input  logic                 start,
  input  logic                 inverse,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned N = 1 << LOG2N;
  localparam int unsigned MW = DW + TW_W;

  typedef logic signed [TW_W-1:0] tw_arr_t [N/2];

  function automatic tw_arr_t mk_cos();
    tw_arr_t t;
    for (int k = 0; k < int'(N/2); k++) t[k] = tw_cos(k, N);
    return t;
  endfunction

  function automatic tw_arr_t mk_msin();
    tw_arr_t t;
    for (int k = 0; k < int'(N/2); k++) t[k] = tw_msin(k, N);
    return t;
  endfunction

  localparam tw_arr_t TWC = mk_cos();   // cos(2*pi*k/N)
  localparam tw_arr_t TWS = mk_msin();  // -sin(2*pi*k/N)

  logic signed [DW-1:0] mre [N];
  logic signed [DW-1:0] mim [N];

  logic                 inv_q;
  logic [$clog2(LOG2N)-1:0] stage;
  logic [LOG2N-2:0]     j;

  // Butterfly addressing.
  logic [$clog2(LOG2N)-1:0] lh;      // log2 of the butterfly span
  logic [LOG2N-1:0]     i0, i1, pos, grp;
  logic [LOG2N-2:0]     twi;

  always_comb begin
    lh  = inv_q ? stage : ($clog2(LOG2N))'(LOG2N - 1) - stage;
    pos = LOG2N'(j) & ((LOG2N'(1) << lh) - 1'b1);
    grp = LOG2N'(j) >> lh;
    i0  = (grp << (lh + 1'b1)) | pos;
    i1  = i0 | (LOG2N'(1) << lh);
    twi = (LOG2N-1)'(pos << (($clog2(LOG2N))'(LOG2N - 1) - lh));
  end

  // Complex rounding multiply (p * w) >> TW_FRAC, conjugate w when inverse.
  logic signed [TW_W-1:0] wr, wi;
  logic signed [DW-1:0]   a_re, a_im, b_re, b_im;
  logic signed [DW-1:0]   m_re, m_im;      // multiplier input
  logic signed [MW:0]     p_re, p_im;
  logic signed [DW-1:0]   t_re, t_im;      // rounded product
  logic signed [DW:0]     s_re, s_im, d_re, d_im;
  logic signed [DW-1:0]   n0_re, n0_im, n1_re, n1_im;

  always_comb begin
    wr   = TWC[twi];
    wi   = inv_q ? -TWS[twi] : TWS[twi];
    a_re = mre[i0];
    a_im = mim[i0];
    b_re = mre[i1];
    b_im = mim[i1];
    // DIF multiplies the difference, DIT multiplies the lower input.
    d_re = (DW+1)'(a_re) - (DW+1)'(b_re);
    d_im = (DW+1)'(a_im) - (DW+1)'(b_im);
    if (inv_q) begin
      m_re = b_re;
      m_im = b_im;
    end else begin
      m_re = DW'(d_re >>> 1);
      m_im = DW'(d_im >>> 1);
    end
    p_re = (MW+1)'(m_re) * (MW+1)'(wr) - (MW+1)'(m_im) * (MW+1)'(wi);
    p_im = (MW+1)'(m_re) * (MW+1)'(wi) + (MW+1)'(m_im) * (MW+1)'(wr);
    t_re = DW'((p_re + (MW+1)'(1 << (TW_FRAC - 1))) >>> TW_FRAC);
    t_im = DW'((p_im + (MW+1)'(1 << (TW_FRAC - 1))) >>> TW_FRAC);
    if (inv_q) begin
      s_re  = (DW+1)'(a_re) + (DW+1)'(t_re);
      s_im  = (DW+1)'(a_im) + (DW+1)'(t_im);
      n0_re = DW'(s_re);
      n0_im = DW'(s_im);
      n1_re = DW'((DW+1)'(a_re) - (DW+1)'(t_re));
      n1_im = DW'((DW+1)'(a_im) - (DW+1)'(t_im));
    end else begin
      s_re  = (DW+1)'(a_re) + (DW+1)'(b_re);
      s_im  = (DW+1)'(a_im) + (DW+1)'(b_im);
      n0_re = DW'((s_re + 1'b1) >>> 1);
      n0_im = DW'((s_im + 1'b1) >>> 1);
      n1_re = t_re;
      n1_im = t_im;
    end
  end

  logic last_bfly;
  assign last_bfly = busy && (32'(stage) == LOG2N - 1) && (&j);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        mre[i] <= '0;
        mim[i] <= '0;
      end
      busy  <= 1'b0;
      done  <= 1'b0;
      inv_q <= 1'b0;
      stage <= '0;
      j     <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        mre[i0] <= n0_re;
        mim[i0] <= n0_im;
        mre[i1] <= n1_re;
        mim[i1] <= n1_im;
        j <= j + 1'b1;
        if (&j) stage <= stage + 1'b1;
        if (last_bfly) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        busy  <= 1'b1;
        inv_q <= inverse;
        stage <= '0;
        j     <= '0;
      end else if (clear) begin
        for (int i = 0; i < int'(N); i++) begin
          mre[i] <= '0;
          mim[i] <= '0;
        end
      end else if (wr_en) begin
        mre[wr_addr] <= wr_re;
        mim[wr_addr] <= wr_im;
      end
    end
  end

  assign rd_re = mre[rd_addr];
  assign rd_im = mim[rd_addr];

endmodule
