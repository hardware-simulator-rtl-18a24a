// Testbench of mimo_freq_domain: loads the frequency responses of pack1,
// streams random samples on both inputs (one every 16 cycles), swaps to
// pack2 while streaming (the swap lands inside block 13) and streams on. Each DAC sample m is
// compared with the floating-point model sum_d h_p(n)[d] x(n), n = m - 32 - d
// (each input sample is filtered with the profile of its own block, which is
// what block-wise overlap-add does), brutally truncated to 14 bits
// (tolerance 2 LSB).
module tb_mimo_freq_domain;
  import chsim_pkg::*;
  import tb_chan_pkg::*;

  localparam int PER = 16;
  localparam int NS = 480;
  localparam int NSWAP = 200;      // swap after this sample
  localparam int TOL = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0;
  sample_t adc_x [2];
  logic wr_en = 1'b0;
  logic [8:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic swap = 1'b0;
  logic dac_valid, overrun;
  dac_t dac [2];
  logic [SHIFT_W-1:0] amp_k [2];
  logic [1:0] sat;

  int checks = 0, failures = 0, novr = 0;
  real maxerr = 0.0;

  mimo_freq_domain dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs [2][NS];
  int nout = 0;
  bit run = 1'b0;

  // Writing pack2 takes 134 cycles from sample NSWAP on, so the swap lands
  // between samples 208 and 209: block 12 (samples 192..207) has already
  // started on pack1, block 13 (208..223) is the first on pack2.
  localparam int FIRST_NEW_BLOCK = 13;

  function automatic int pack_of(int n);
    return ((n / 16) >= FIRST_NEW_BLOCK) ? 1 : 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (overrun) novr++;
    if (dac_valid && run) begin
      for (int r = 0; r < 2; r++) begin
        real y;
        int e, m;
        y = 0.0;
        m = nout - 32;
        for (int tx = 0; tx < 2; tx++)
          for (int k = 0; k < NP; k++)
            if (m - DLY[k] >= 0 && m - DLY[k] < NS)
              y += real'(fir_word(pack_of(m - DLY[k]), 2 * r + tx, k)) / 16384.0
                   * real'(xs[tx][m - DLY[k]]);
        e = $rtoi($floor(y / 8.0));
        checks++;
        if (int'(dac[r]) - e > TOL || e - int'(dac[r]) > TOL || amp_k[r] != 2'd3) begin
          failures++;
          if (failures < 10) $display("out %0d rx%0d: %0d expected %0d", nout, r, dac[r], e);
        end
      end
      nout++;
    end
  end

  task automatic load(input int pack);
    for (int c = 0; c < 4; c++)
      for (int k = 0; k <= 32; k++) begin
        @(posedge clk);
        wr_en <= 1'b1;
        wr_addr <= {2'(c), 7'(k)};
        wr_data <= (k < 32) ? h_word(pack, c, k) : 32'd1;
      end
    @(posedge clk);
    wr_en <= 1'b0;
    swap <= 1'b1;
    @(posedge clk);
    swap <= 1'b0;
  endtask

  initial begin
    adc_x[0] = '0; adc_x[1] = '0;
    for (int i = 0; i < NS; i++) begin
      xs[0][i] = (i < NS - 40) ? int'($urandom_range(6000)) - 3000 : 0;
      xs[1][i] = (i < NS - 40) ? int'($urandom_range(6000)) - 3000 : 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    load(0);
    run = 1'b1;
    for (int i = 0; i < NS; i++) begin
      @(posedge clk);
      adc_valid <= 1'b1;
      adc_x[0] <= sample_t'(xs[0][i]);
      adc_x[1] <= sample_t'(xs[1][i]);
      @(posedge clk);
      adc_valid <= 1'b0;
      repeat (PER - 2) @(posedge clk);
      if (i == NSWAP) begin
        // write pack2 into the shadow banks while streaming
        fork
          load(1);
          begin
            for (int j = 0; j < 8; j++) begin
              @(posedge clk);
              adc_valid <= 1'b1;
              adc_x[0] <= sample_t'(xs[0][i + 1 + j]);
              adc_x[1] <= sample_t'(xs[1][i + 1 + j]);
              @(posedge clk);
              adc_valid <= 1'b0;
              repeat (PER - 2) @(posedge clk);
            end
          end
        join
        i += 8;
      end
    end
    checks++;
    if (novr != 0 || nout != NS) begin
      failures++;
      $display("%0d overruns, %0d outputs", novr, nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
