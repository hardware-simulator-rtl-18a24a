// Digital block of a 2x2 MIMO radio channel hardware simulator.
//
// Two ADC sample streams (the down-converted transmitter signals) enter,
// two DAC sample streams (the faded receiver signals) leave. The block
// holds both channel architectures, which run side by side on the same
// samples; arch_sel chooses which one drives the DACs:
//   arch_sel = 0: time domain, four sparse FIR filters (9 multipliers over
//                 15 samples each), sliding window truncation, latency of a
//                 few cycles, one sample per clock;
//   arch_sel = 1: frequency domain, four FFT/IFFT overlap-add channels of
//                 32 points, brutal truncation, at most one sample every 16
//                 clocks.
// The time-varying channel is a sequence of profiles, refreshed at 18.18 Hz.
// The host (behind the PCI bus) writes the next profile of all four
// sub-channels, then pulses host_commit; refresh_ctrl swaps the profile
// banks of both architectures at the next refresh tick.
//
// Host address map (host_wr.addr, 10 bits):
//   [9]   architecture: 0 = time domain (16-bit words, wdata[15:0]),
//                       1 = frequency domain (32-bit words)
//   [8:7] sub-channel: 0 = h11, 1 = h12, 2 = h21, 3 = h22 (h_rt: t -> r)
//   [6:0] word in the profile (time: 0..8 taps, 9 header;
//                              frequency: 0..31 H[k], 32 header)
// amp_k[r] is the gain exponent for the reconfigurable analog amplifier
// after DAC r (multiply by 2^amp_k), the position of the truncation window.
module mimo_chsim_top
  import chsim_pkg::*;
#(
  parameter int unsigned REFRESH_PERIOD = REFRESH_CYCLES_180MHZ
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_valid,
  input  sample_t            adc_x [2],
  input  host_wr_t           host_wr,
  input  logic               host_commit,
  input  logic               arch_sel,
  output logic               dac_valid,
  output dac_t               dac_y [2],
  output logic [SHIFT_W-1:0] amp_k [2],
  output logic [1:0]         dac_sat,
  output logic               refresh_tick,
  output logic               profile_swap,
  output logic               profile_held,
  output logic               profile_pending,
  output logic               freq_overrun
);

  logic               t_valid, f_valid;
  dac_t               t_dac [2], f_dac [2];
  logic [SHIFT_W-1:0] t_k [2], f_k [2];
  logic [1:0]         t_sat, f_sat;

  refresh_ctrl #(.PERIOD(REFRESH_PERIOD)) u_refresh (
    .clk, .rst_n,
    .commit (host_commit),
    .tick   (refresh_tick),
    .swap   (profile_swap),
    .pending(profile_pending),
    .held   (profile_held)
  );

  mimo_time_domain u_time (
    .clk, .rst_n,
    .adc_valid,
    .adc_x,
    .wr_en    (host_wr.we && !host_wr.addr[9]),
    .wr_addr  (host_wr.addr[8:0]),
    .wr_data  (host_wr.wdata[15:0]),
    .swap     (profile_swap),
    .dac_valid(t_valid),
    .dac      (t_dac),
    .amp_k    (t_k),
    .sat      (t_sat)
  );

  mimo_freq_domain u_freq (
    .clk, .rst_n,
    .adc_valid,
    .adc_x,
    .wr_en    (host_wr.we && host_wr.addr[9]),
    .wr_addr  (host_wr.addr[8:0]),
    .wr_data  (host_wr.wdata),
    .swap     (profile_swap),
    .dac_valid(f_valid),
    .dac      (f_dac),
    .amp_k    (f_k),
    .sat      (f_sat),
    .overrun  (freq_overrun)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_valid <= 1'b0;
      dac_y     <= '{default: '0};
      amp_k     <= '{default: '0};
      dac_sat   <= '0;
    end else begin
      dac_valid <= arch_sel ? f_valid : t_valid;
      dac_y     <= arch_sel ? f_dac : t_dac;
      amp_k     <= arch_sel ? f_k : t_k;
      dac_sat   <= arch_sel ? f_sat : t_sat;
    end
  end

endmodule
