// End-to-end testbench of mimo_chsim_top (refresh period shortened to 4000
// cycles). It runs the Gaussian test of the channel simulator: the pulse
// x(t) = 0.5 V exp(-(t-21)^2 / (2 (21/4)^2)), 0 <= t <= 96 Ts, on both
// transmit inputs, through the 2x2 TGn model B profiles pack1 and then
// pack2, once with the time-domain and once with the frequency-domain
// architecture driving the DACs. The DAC samples, scaled back by 2^amp_k,
// are compared with the theoretical output sum_k h_k x(t - d_k): the
// global relative error and SNR over 3N + 14 = 110 samples are printed
// and must reach 60 dB (time) and 50 dB (frequency); each sample must be
// within 4 DAC LSB.
// It also makes each mechanism happen and counts it: profile commit and
// swap at a refresh tick, a refresh tick with nothing pending (held), both
// architecture selections, sliding window (amp_k = 2) and brutal (amp_k = 3)
// truncation, a saturated DAC window, and a frequency-domain overrun when
// the stream runs at one sample per clock (the time domain must still
// deliver one DAC sample per input sample then).
module tb_mimo_chsim_top;
  import chsim_pkg::*;
  import tb_chan_pkg::*;

  localparam int PER = 16;
  localparam int RP = 4000;
  localparam int NSTREAM = 160;
  localparam int NEVAL = 111;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0;
  sample_t adc_x [2];
  host_wr_t host_wr = '0;
  logic host_commit = 1'b0, arch_sel = 1'b0;
  logic dac_valid;
  dac_t dac_y [2];
  logic [SHIFT_W-1:0] amp_k [2];
  logic [1:0] dac_sat;
  logic refresh_tick, profile_swap, profile_held, profile_pending, freq_overrun;

  int checks = 0, failures = 0;
  int n_swap = 0, n_held = 0, n_ovr = 0, n_sat = 0, n_sliding = 0, n_brutal = 0;
  int n_arch [2] = '{0, 0};

  mimo_chsim_top #(.REFRESH_PERIOD(RP)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit cnt_full = 1'b0;
  int n_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (cnt_full && dac_valid) n_full++;
    if (profile_swap) n_swap++;
    if (profile_held) n_held++;
    if (freq_overrun) n_ovr++;
    if (dac_valid && |dac_sat) n_sat++;
  end

  // Output capture of the current stream.
  real vout [2][NSTREAM];
  int  nev = 0;
  bit  cap = 1'b0;
  always @(posedge clk) if (rst_n && cap && dac_valid && nev < NSTREAM) begin
    for (int r = 0; r < 2; r++)
      vout[r][nev] = real'(dac_y[r]) * real'(1 << amp_k[r]) / 8192.0;
    if (amp_k[0] == 2'd2) n_sliding++;
    if (amp_k[0] == 2'd3) n_brutal++;
    nev++;
  end

  task automatic host_write(input logic [9:0] a, input logic [31:0] d);
    @(posedge clk);
    host_wr <= '{we: 1'b1, addr: a, wdata: d};
    @(posedge clk);
    host_wr <= '0;
  endtask

  task automatic load_pack(input int pack, input int tshift);
    for (int c = 0; c < 4; c++) begin
      for (int k = 0; k < 9; k++) host_write({1'b0, 2'(c), 7'(k)}, 32'(fir_word(pack, c, k)));
      host_write({1'b0, 2'(c), 7'd9}, 32'(tshift));
      for (int m = 0; m < 32; m++) host_write({1'b1, 2'(c), 7'(m)}, h_word(pack, c, m));
      host_write({1'b1, 2'(c), 7'd32}, 32'd3);
    end
    @(posedge clk);
    host_commit <= 1'b1;
    @(posedge clk);
    host_commit <= 1'b0;
    checks++;
    @(negedge clk);
    if (!profile_pending) begin
      failures++;
      $display("commit not pending");
    end
    while (!profile_swap) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic pulse(input int pack, input bit arch, input real min_snr);
    int lat;
    real en, yn, snr, err;
    lat = arch ? 32 : 0;
    arch_sel <= arch;
    n_arch[arch]++;
    repeat (20) @(posedge clk);
    nev = 0;
    cap = 1'b1;
    for (int i = 0; i < NSTREAM; i++) begin
      @(posedge clk);
      adc_valid <= 1'b1;
      adc_x[0] <= sample_t'(rnd(gauss(i) * 8192.0));
      adc_x[1] <= sample_t'(rnd(gauss(i) * 8192.0));
      @(posedge clk);
      adc_valid <= 1'b0;
      repeat (PER - 2) @(posedge clk);
    end
    cap = 1'b0;
    en = 0.0; yn = 0.0;
    for (int r = 0; r < 2; r++)
      for (int t = 0; t < NEVAL; t++) begin
        real yt, yx;
        yt = y_theory(pack, r, t);
        yx = vout[r][t + lat];
        en += (yx - yt) ** 2;
        yn += yt ** 2;
        checks++;
        if ((yx - yt) > 4.0 * 8.0 / 8192.0 || (yt - yx) > 4.0 * 8.0 / 8192.0) begin
          failures++;
          if (failures < 10) $display("pack%0d arch %0d rx%0d t=%0d: %f V, theory %f V", pack + 1, arch, r, t, yx, yt);
        end
      end
    err = $sqrt(en / yn) * 100.0;
    snr = 20.0 * $log10($sqrt(yn / en));
    $display("pack%0d %s architecture: global error %.4f %%, global SNR %.2f dB",
             pack + 1, arch ? "frequency" : "time", err, snr);
    checks++;
    if (snr < min_snr) begin
      failures++;
      $display("SNR below %.1f dB", min_snr);
    end
  endtask

  initial begin
    adc_x[0] = '0; adc_x[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // pack1: y_max is about 2.6 V, so the time domain uses window 2.
    load_pack(0, 2);
    pulse(0, 1'b0, 60.0);
    pulse(0, 1'b1, 50.0);
    // let one refresh tick pass with nothing committed
    begin
      int h0 = n_held;
      while (n_held == h0) @(posedge clk);
    end
    load_pack(1, 2);
    pulse(1, 1'b0, 60.0);
    pulse(1, 1'b1, 50.0);

    // Full-rate stream: the time domain follows every sample, the
    // frequency domain reports an overrun. Window 0 makes the time output
    // saturate on large samples.
    load_pack(1, 0);
    arch_sel <= 1'b0;
    n_arch[0]++;
    repeat (20) @(posedge clk);
    cnt_full = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      adc_valid <= 1'b1;
      adc_x[0] <= sample_t'(int'($urandom_range(16000)) - 8000);
      adc_x[1] <= sample_t'(int'($urandom_range(16000)) - 8000);
    end
    @(posedge clk);
    adc_valid <= 1'b0;
    repeat (300) @(posedge clk);
    checks++;
    if (n_full != 200) begin
      failures++;
      $display("%0d DAC samples for 200 full-rate inputs", n_full);
    end

    $display("swaps %0d, held ticks %0d, overruns %0d, saturated samples %0d, sliding %0d, brutal %0d, time sel %0d, freq sel %0d",
             n_swap, n_held, n_ovr, n_sat, n_sliding, n_brutal, n_arch[0], n_arch[1]);
    checks++; if (n_swap != 3)  begin failures++; $display("expected 3 swaps"); end
    checks++; if (n_held == 0)  begin failures++; $display("no held tick"); end
    checks++; if (n_ovr == 0)   begin failures++; $display("no overrun"); end
    checks++; if (n_sat == 0)   begin failures++; $display("no saturation"); end
    checks++; if (n_sliding == 0) begin failures++; $display("no sliding window"); end
    checks++; if (n_brutal == 0)  begin failures++; $display("no brutal truncation"); end
    checks++; if (n_arch[0] == 0 || n_arch[1] == 0) begin failures++; $display("architecture not switched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
