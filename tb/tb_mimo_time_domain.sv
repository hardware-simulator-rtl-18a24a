// Testbench of mimo_time_domain: loads pack1 of the TGn model B 2x2
// profiles (window shift 2), streams random samples on both inputs, then
// loads pack2 with other window positions (0 and 3) and streams again.
// Every DAC sample is compared with a bit-exact model of the four FIR
// filters, the final adders and the truncation, and the ADC-to-DAC latency
// must be 6 cycles at one sample per clock. Profile swaps happen while the
// input is idle.
module tb_mimo_time_domain;
  import chsim_pkg::*;
  import tb_chan_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0;
  sample_t adc_x [2];
  logic wr_en = 1'b0;
  logic [8:0] wr_addr = '0;
  logic [15:0] wr_data = '0;
  logic swap = 1'b0;
  logic dac_valid;
  dac_t dac [2];
  logic [SHIFT_W-1:0] amp_k [2];
  logic [1:0] sat;

  int checks = 0, failures = 0, nsat = 0;
  int unsigned cyc = 0;

  mimo_time_domain dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int coef [4][9];
  int shf [2];
  int hist [2][$];
  int expq [2][$];
  int tq [$];

  function automatic int fir_ref(int c);
    longint acc = 0;
    longint r;
    for (int k = 0; k < 9; k++)
      if (DLY[k] < hist[c % 2].size()) acc += longint'(hist[c % 2][DLY[k]]) * coef[c][k];
    r = (acc + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && adc_valid) begin
      hist[0].push_front(int'(adc_x[0]));
      hist[1].push_front(int'(adc_x[1]));
      for (int r = 0; r < 2; r++) begin
        int s, v;
        s = fir_ref(2 * r) + fir_ref(2 * r + 1);
        v = s >>> shf[r];
        if (v > 8191) begin v = 8191; nsat++; end
        if (v < -8192) begin v = -8192; nsat++; end
        expq[r].push_back(v);
      end
      tq.push_back(int'(cyc));
    end
    if (rst_n && dac_valid) begin
      int t0;
      t0 = tq.pop_front();
      checks++;
      if (int'(cyc) - t0 != 6) begin
        failures++;
        if (failures < 10) $display("latency %0d", int'(cyc) - t0);
      end
      for (int r = 0; r < 2; r++) begin
        int e;
        e = expq[r].pop_front();
        checks++;
        if (int'(dac[r]) != e || int'(amp_k[r]) != shf[r]) begin
          failures++;
          if (failures < 10) $display("rx%0d: %0d (k %0d) expected %0d (k %0d)", r, dac[r], amp_k[r], e, shf[r]);
        end
      end
    end
  end

  task automatic load(input int pack, input int s0, input int s1);
    for (int c = 0; c < 4; c++)
      for (int k = 0; k <= 9; k++) begin
        @(posedge clk);
        wr_en <= 1'b1;
        wr_addr <= {2'(c), 7'(k)};
        wr_data <= (k < 9) ? fir_word(pack, c, k) : 16'((c == 0) ? s0 : (c == 2) ? s1 : 3);
      end
    // a word outside the profile must be ignored
    @(posedge clk);
    wr_addr <= {2'd0, 7'd16};
    wr_data <= 16'h7fff;
    @(posedge clk);
    wr_en <= 1'b0;
    repeat (10) @(posedge clk);
    swap <= 1'b1;
    @(posedge clk);
    swap <= 1'b0;
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 9; k++) coef[c][k] = int'($signed(fir_word(pack, c, k)));
    shf[0] = s0;
    shf[1] = s1;
    @(posedge clk);
  endtask

  task automatic stream(input int n, input int amp_lsb);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      adc_valid <= 1'b1;
      adc_x[0] <= sample_t'(int'($urandom_range(2 * amp_lsb)) - amp_lsb);
      adc_x[1] <= sample_t'(int'($urandom_range(2 * amp_lsb)) - amp_lsb);
    end
    @(posedge clk);
    adc_valid <= 1'b0;
    repeat (12) @(posedge clk);
  endtask

  initial begin
    adc_x[0] = '0; adc_x[1] = '0;
    for (int c = 0; c < 4; c++) for (int k = 0; k < 9; k++) coef[c][k] = 0;
    shf[0] = 0; shf[1] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    load(0, 2, 2);
    stream(500, 4000);
    load(1, 0, 3);
    stream(500, 1500);
    stream(300, 8000);
    checks++;
    if (tq.size() != 0 || nsat == 0) begin
      failures++;
      $display("%0d outputs missing, %0d saturations", tq.size(), nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
