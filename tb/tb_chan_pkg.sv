// Test data shared by the MIMO testbenches: the two successive 2x2 TGn
// model B profiles (pack1, pack2: relative power of each path of h11, h12,
// h21, h22 in dB), the Gaussian test pulse and the conversions of a
// profile into FIR coefficient words (Q2.14) and frequency-response words
// (32-point DFT of the zero-padded impulse response, Q4.12 re/im).
// Path amplitudes are taken real and positive: a = 10^(dB/20).
package tb_chan_pkg;

  localparam int NP = 9;
  localparam int DLY [NP] = '{0, 2, 4, 5, 7, 9, 11, 13, 14};

  // [pack][channel h11,h12,h21,h22][path]
  localparam real PACK_DB [2][4][NP] = '{
    '{ '{-7.16, -6.49,  -9.49, -9.05, -9.16,  -9.79, -13.69, -19.31, -14.08},
       '{-6.62, -6.18, -11.36, -8.91, -9.54,  -9.85, -14.34, -17.67, -14.14},
       '{-7.65, -6.33,  -9.52, -8.99, -9.13,  -9.46, -14.88, -18.26, -14.14},
       '{-7.55, -6.49, -10.99, -9.08, -9.32,  -9.46, -14.17, -18.96, -14.13} },
    '{ '{-6.75, -6.38,  -8.18, -9.03, -9.02, -10.24, -13.92, -17.77, -14.13},
       '{-6.89, -6.41,  -9.40, -8.87, -9.15, -10.22, -13.24, -18.76, -14.10},
       '{-6.73, -6.24, -10.84, -8.96, -9.17,  -9.67, -15.11, -19.03, -14.13},
       '{-7.25, -6.44, -11.58, -8.90, -9.69, -10.04, -13.74, -19.28, -14.13} } };

  localparam real PI = 3.14159265358979323846;

  function automatic real amp(int pack, int c, int k);
    return 10.0 ** (PACK_DB[pack][c][k] / 20.0);
  endfunction

  function automatic int rnd(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  // FIR coefficient word of path k (Q2.14).
  function automatic logic [15:0] fir_word(int pack, int c, int k);
    return 16'(rnd(amp(pack, c, k) * 16384.0));
  endfunction

  // Frequency-response word of bin m: {re, im}, Q4.12.
  function automatic logic [31:0] h_word(int pack, int c, int m);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < NP; k++) begin
      re += amp(pack, c, k) * $cos(2.0 * PI * DLY[k] * m / 32.0);
      im -= amp(pack, c, k) * $sin(2.0 * PI * DLY[k] * m / 32.0);
    end
    return {16'(rnd(re * 4096.0)), 16'(rnd(im * 4096.0))};
  endfunction

  // Gaussian test pulse in volts: x_m = 0.5 V, m_x = 21 Ts, sigma = m_x/4,
  // defined on 0 <= t <= 3 W_t = 96 Ts.
  function automatic real gauss(int t);
    real s = 21.0 / 4.0;
    if (t < 0 || t > 96) return 0.0;
    return 0.5 * $exp(-((t - 21.0) ** 2) / (2.0 * s * s));
  endfunction

  // Theoretical output of receive antenna r (volts) for the same pulse on
  // both transmit inputs: y = sum over both channels and paths.
  function automatic real y_theory(int pack, int r, int t);
    real y = 0.0;
    for (int tx = 0; tx < 2; tx++)
      for (int k = 0; k < NP; k++) y += amp(pack, 2 * r + tx, k) * gauss(t - DLY[k]);
    return y;
  endfunction

endpackage
