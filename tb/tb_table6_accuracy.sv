// Accuracy workload: global relative error and SNR of both architectures
// without truncation, with the sliding window and with brutal truncation,
// for the two successive TGn model B 2x2 profiles (pack1, pack2).
//
// The Gaussian pulse x(t) = 0.5 V exp(-(t-21)^2 / (2 (21/4)^2)) drives both
// inputs of a time-domain block and of two frequency-domain blocks (one with
// the sliding window, one with brutal truncation). "Without truncation" is
// the 17-bit final sum inside each block. Error = ||E|| / ||Y|| and
// SNR = 20 log10(||Y|| / ||E||) with rms norms over 3N + 14 = 110 samples,
// against y(t) = sum_k h_k x(t - d_k). The time domain runs once with
// window k = 2 (the smallest with y_max < 2^k V) and once with k = 3, which
// is the brutal cut. Checked: every SNR reaches its floor, and for the time
// domain the sliding window is more accurate than brutal truncation.
module tb_table6_accuracy;
  import chsim_pkg::*;
  import tb_chan_pkg::*;

  localparam int PER = 16;
  localparam int NSTREAM = 160;
  localparam int NEVAL = 111;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0;
  sample_t adc_x [2];
  logic wr_t = 1'b0, wr_f = 1'b0, swap = 1'b0;
  logic [8:0] wr_addr = '0;
  logic [31:0] wr_data = '0;

  logic t_v, fs_v, fb_v, fs_o, fb_o;
  dac_t t_dac [2], fs_dac [2], fb_dac [2];
  logic [SHIFT_W-1:0] t_k [2], fs_k [2], fb_k [2];
  logic [1:0] t_sat, fs_sat, fb_sat;

  int checks = 0, failures = 0;

  mimo_time_domain u_t (
    .clk, .rst_n, .adc_valid, .adc_x, .wr_en(wr_t), .wr_addr, .wr_data(wr_data[15:0]),
    .swap, .dac_valid(t_v), .dac(t_dac), .amp_k(t_k), .sat(t_sat));
  mimo_freq_domain #(.BRUTAL(1'b0)) u_fs (
    .clk, .rst_n, .adc_valid, .adc_x, .wr_en(wr_f), .wr_addr, .wr_data,
    .swap, .dac_valid(fs_v), .dac(fs_dac), .amp_k(fs_k), .sat(fs_sat), .overrun(fs_o));
  mimo_freq_domain #(.BRUTAL(1'b1)) u_fb (
    .clk, .rst_n, .adc_valid, .adc_x, .wr_en(wr_f), .wr_addr, .wr_data,
    .swap, .dac_valid(fb_v), .dac(fb_dac), .amp_k(fb_k), .sat(fb_sat), .overrun(fb_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // captured outputs in volts: 0 time raw, 1 time DAC, 2 freq raw,
  // 3 freq sliding DAC, 4 freq brutal DAC
  real v [5][2][NSTREAM];
  int  nt = 0, nf = 0;
  bit  cap = 1'b0;

  always @(posedge clk) if (rst_n && cap) begin
    if (t_v && nt < NSTREAM) begin
      v[0][0][nt] = real'(u_t.g_rx[0].u_comb.sum) / 8192.0;
      v[0][1][nt] = real'(u_t.g_rx[1].u_comb.sum) / 8192.0;
      for (int r = 0; r < 2; r++) v[1][r][nt] = real'(t_dac[r]) * real'(1 << t_k[r]) / 8192.0;
      nt++;
    end
    if (fs_v && nf < NSTREAM) begin
      v[2][0][nf] = real'(u_fs.g_rx[0].u_comb.sum) / 8192.0;
      v[2][1][nf] = real'(u_fs.g_rx[1].u_comb.sum) / 8192.0;
      for (int r = 0; r < 2; r++) begin
        v[3][r][nf] = real'(fs_dac[r]) * real'(1 << fs_k[r]) / 8192.0;
        v[4][r][nf] = real'(fb_dac[r]) * real'(1 << fb_k[r]) / 8192.0;
      end
      nf++;
    end
  end

  task automatic wr(input bit f, input logic [8:0] a, input logic [31:0] d);
    @(posedge clk);
    wr_t <= !f; wr_f <= f; wr_addr <= a; wr_data <= d;
    @(posedge clk);
    wr_t <= 1'b0; wr_f <= 1'b0;
  endtask

  task automatic load(input int pack, input int tshift);
    for (int c = 0; c < 4; c++) begin
      for (int k = 0; k < 9; k++) wr(1'b0, {2'(c), 7'(k)}, 32'(fir_word(pack, c, k)));
      wr(1'b0, {2'(c), 7'd9}, 32'(tshift));
      for (int m = 0; m < 32; m++) wr(1'b1, {2'(c), 7'(m)}, h_word(pack, c, m));
      wr(1'b1, {2'(c), 7'd32}, 32'd2);
    end
    @(posedge clk);
    swap <= 1'b1;
    @(posedge clk);
    swap <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  task automatic stream();
    nt = 0; nf = 0;
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
  endtask

  function automatic real snr_of(int pack, int which, int lat, output real err);
    real en = 0.0, yn = 0.0;
    for (int r = 0; r < 2; r++)
      for (int t = 0; t < NEVAL; t++) begin
        real yt = y_theory(pack, r, t);
        en += (v[which][r][t + lat] - yt) ** 2;
        yn += yt ** 2;
      end
    err = $sqrt(en / yn) * 100.0;
    return 20.0 * $log10($sqrt(yn / en));
  endfunction

  task automatic report(input string what, input real snr, input real err, input real floor_db);
    $display("  %-40s error %8.4f %%   SNR %6.2f dB", what, err, snr);
    checks++;
    if (snr < floor_db) begin
      failures++;
      $display("  below %.1f dB", floor_db);
    end
  endtask

  initial begin
    real e, s, s_slide, s_brutal;
    adc_x[0] = '0; adc_x[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int pack = 0; pack < 2; pack++) begin
      $display("pack%0d", pack + 1);
      load(pack, 2);
      stream();
      s = snr_of(pack, 0, 0, e);  report("time domain, without truncation", s, e, 70.0);
      s_slide = snr_of(pack, 1, 0, e); report("time domain, sliding window (k = 2)", s_slide, e, 65.0);
      s = snr_of(pack, 2, 32, e); report("frequency domain, without truncation", s, e, 60.0);
      s = snr_of(pack, 3, 32, e); report("frequency domain, sliding window (k = 2)", s, e, 60.0);
      s = snr_of(pack, 4, 32, e); report("frequency domain, brutal truncation", s, e, 55.0);
      load(pack, 3);
      stream();
      s_brutal = snr_of(pack, 1, 0, e); report("time domain, brutal truncation (k = 3)", s_brutal, e, 60.0);
      checks++;
      if (s_slide <= s_brutal) begin
        failures++;
        $display("  sliding window not better than brutal truncation");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
