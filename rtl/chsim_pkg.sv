// Shared widths, number formats and the FFT twiddle table of the MIMO
// channel simulator digital block.
//
// Number formats (two's complement):
//   converter sample  : ADC_W = 14 bits, Q1.13, full scale +-1 V = +-8192
//   FIR coefficient   : COEF_W = 16 bits, Q2.14 (range +-2)
//   SISO output       : SISO_W = 16 bits, Q3.13 (range +-4 V), saturated
//   final adder       : SUM_W = 17 bits, Q4.13 (sum of two SISO outputs)
//   DAC sample        : DAC_W = 14 bits, 14-bit window of the 17-bit sum
//   frequency coeff.  : one 32-bit word {re[15:0], im[15:0]}, each Q4.12
//
// The 14-bit DAC, the 17-to-14-bit truncation, the 16-bit FIR profile words
// and the 32-bit frequency profile words come from the architecture
// description; the fractional splits are this design's choice.
package chsim_pkg;

  localparam int unsigned ADC_W   = 14;
  localparam int unsigned DAC_W   = 14;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned COEF_FRAC = 14;
  localparam int unsigned SISO_W  = 16;
  localparam int unsigned SUM_W   = 17;
  localparam int unsigned H_FRAC  = 12;   // Q4.12 real and imaginary parts
  localparam int unsigned SHIFT_W = 2;    // truncation window position 0..3
  localparam int unsigned TW_W    = 16;   // twiddle factors, Q1.14
  localparam int unsigned TW_FRAC = 14;

  // TGn model B: 9 paths, largest excess delay 14 samples.
  localparam int unsigned TGN_NPATHS = 9;
  localparam int unsigned TGN_MAX_DELAY = 14;
  typedef int unsigned delay_arr_t [TGN_NPATHS];
  localparam delay_arr_t TGN_B_DELAYS = '{0, 2, 4, 5, 7, 9, 11, 13, 14};

  // Refresh rate of the time-varying profiles: 18.18 Hz at a 180 MHz clock.
  localparam int unsigned REFRESH_CYCLES_180MHZ = 9_900_990;

  typedef logic signed [ADC_W-1:0]  sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [SISO_W-1:0] siso_t;
  typedef logic signed [SUM_W-1:0]  sum_t;
  typedef logic signed [DAC_W-1:0]  dac_t;

  // Host write bus of the profile reload path (the PCI side).
  typedef struct packed {
    logic        we;
    logic [9:0]  addr;   // [9] architecture, [8:7] SISO channel, [6:0] word
    logic [31:0] wdata;
  } host_wr_t;

  // Twiddle factor W_N^k = exp(-j*2*pi*k/N) in Q1.14, rounded.
  function automatic logic signed [TW_W-1:0] tw_cos(int unsigned k, int unsigned n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return TW_W'($rtoi($floor($cos(a) * real'(1 << TW_FRAC) + 0.5)));
  endfunction

  function automatic logic signed [TW_W-1:0] tw_msin(int unsigned k, int unsigned n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return TW_W'($rtoi($floor(-$sin(a) * real'(1 << TW_FRAC) + 0.5)));
  endfunction

endpackage
