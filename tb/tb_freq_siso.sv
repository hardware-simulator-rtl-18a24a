// Testbench of freq_siso: loads the 32-point spectrum of a random sparse
// impulse response on the TGn model B delays, streams an impulse and a
// random signal through it and compares every output sample with the
// linear convolution computed here in floating point (tolerance 6 LSB of
// Q3.13), delayed by the expected 32 samples. Also checks the block
// processing time (<= 16 cycles per sample) and that a stream twice too
// fast raises overrun.
module tb_freq_siso;
  import chsim_pkg::*;

  localparam int N = 32;
  localparam int PER = 16;         // clock cycles per sample
  localparam int NS = 400;         // samples in the main run
  localparam int TOL = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0;
  sample_t x = '0;
  logic wr_en = 1'b0;
  logic [5:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic swap = 1'b0;
  logic y_valid, overrun, blk_done;
  siso_t y;
  logic [31:0] y_hdr;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  freq_siso dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real h [15];
  real xs [NS];
  int  nsent = 0;
  int  nout = 0;
  int  ovr = 0;
  int  maxproc = 0;
  int  t_blk = -1;
  bit  check_on = 1'b0;

  function automatic int q(real v, int frac);
    return $rtoi($floor(v * real'(1 << frac) + 0.5));
  endfunction

  task automatic load_profile(input int hdr);
    for (int k = 0; k < N; k++) begin
      real re = 0.0, im = 0.0;
      for (int d = 0; d < 15; d++) begin
        re += h[d] * $cos(2.0 * 3.14159265358979 * d * k / N);
        im -= h[d] * $sin(2.0 * 3.14159265358979 * d * k / N);
      end
      @(posedge clk);
      wr_en <= 1'b1; wr_addr <= 6'(k);
      wr_data <= {16'(q(re, 12)), 16'(q(im, 12))};
    end
    @(posedge clk);
    wr_en <= 1'b1; wr_addr <= 6'd32; wr_data <= 32'(hdr);
    @(posedge clk);
    wr_en <= 1'b0; swap <= 1'b1;
    @(posedge clk);
    swap <= 1'b0;
  endtask

  // Output checker: sample index nout matches reference sample nout - 32.
  always @(posedge clk) if (y_valid && check_on) begin
    real ref_v;
    int t;
    ref_v = 0.0;
    t = nout - 2 * (N / 2);
    for (int d = 0; d < 15; d++)
      if (t - d >= 0 && t - d < NS) ref_v += h[d] * xs[t - d];
    checks++;
    if ($rtoi(ref_v) - int'(y) > TOL || int'(y) - $rtoi(ref_v) > TOL) begin
      failures++;
      if (failures < 10) $display("mismatch out %0d: got %0d want %f", nout, y, ref_v);
    end
    if (y_hdr != 32'h2 && t >= 0) begin
      failures++;
      if (failures < 10) $display("header mismatch %h", y_hdr);
    end
    nout++;
  end

  always @(posedge clk) begin
    if (overrun) ovr++;
    if (blk_done && t_blk >= 0) begin
      if (int'(cyc) - t_blk > maxproc) maxproc = int'(cyc) - t_blk;
    end
  end

  initial begin
    int taps[9] = '{0, 2, 4, 5, 7, 9, 11, 13, 14};
    for (int d = 0; d < 15; d++) h[d] = 0.0;
    for (int k = 0; k < 9; k++) h[taps[k]] = (real'($urandom_range(1200)) - 600.0) / 1000.0;
    for (int i = 0; i < NS; i++) xs[i] = 0.0;
    xs[3] = 4000.0;                        // impulse first
    for (int i = 40; i < NS; i++) xs[i] = real'($urandom_range(8000)) - 4000.0;

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    load_profile(2);
    check_on = 1'b1;
    for (int i = 0; i < NS + 40; i++) begin
      @(posedge clk);
      x_valid <= 1'b1;
      x <= (i < NS) ? sample_t'($rtoi(xs[i])) : '0;
      if ((i % 16) == 15) t_blk = int'(cyc) + 1;
      @(posedge clk);
      x_valid <= 1'b0;
      repeat (PER - 2) @(posedge clk);
    end
    check_on = 1'b0;
    $display("block processing %0d cycles at %0d cycles per sample", maxproc, PER);
    checks++;
    if (maxproc == 0 || maxproc > PER * 16) begin
      failures++;
      $display("block processing took %0d cycles", maxproc);
    end
    checks++;
    if (ovr != 0) begin
      failures++;
      $display("unexpected overrun");
    end
    // Too fast: one sample every 8 cycles.
    for (int i = 0; i < 64; i++) begin
      @(posedge clk);
      x_valid <= 1'b1;
      x <= '0;
      @(posedge clk);
      x_valid <= 1'b0;
      repeat (6) @(posedge clk);
    end
    checks++;
    if (ovr == 0) begin
      failures++;
      $display("overrun never raised");
    end
    $display("overruns at 8 cycles per sample: %0d", ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
