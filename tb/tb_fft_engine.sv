// Testbench of fft_engine (N = 32): random complex frames through the
// forward transform (expected X[k]/32, read at bit-reversed addresses) and
// through the inverse transform (bit-reversed input, expected unscaled
// IDFT), both against a direct DFT computed here in floating point. Each
// entry must lie within 1e-3 of the frame's rms value (+4 LSB), and the
// transform must take N/2*log2 N = 80 cycles from start to done.
module tb_fft_engine;
  localparam int N = 32;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, wr_en = 1'b0, start = 1'b0, inverse = 1'b0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  logic signed [31:0] wr_re = '0, wr_im = '0, rd_re, rd_im;
  logic busy, done;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  fft_engine dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int br(int v);
    int r = 0;
    for (int i = 0; i < L; i++) if (v & (1 << i)) r |= 1 << (L - 1 - i);
    return r;
  endfunction

  real xr [N], xi [N], er [N], ei [N];

  task automatic run(input bit inv);
    int t0, dur;
    real rms, tol;
    // reference
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a = (inv ? 2.0 : -2.0) * 3.14159265358979 * n * k / N;
        er[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
        ei[k] += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      if (!inv) begin er[k] /= N; ei[k] /= N; end
    end
    @(posedge clk);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int n = 0; n < N; n++) begin
      @(posedge clk);
      wr_en <= 1'b1;
      wr_addr <= 5'(inv ? br(n) : n);
      wr_re <= 32'($rtoi(xr[n])); wr_im <= 32'($rtoi(xi[n]));
    end
    @(posedge clk);
    wr_en <= 1'b0; start <= 1'b1; inverse <= inv;
    t0 = int'(cyc);
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    dur = int'(cyc) - t0;
    checks++;
    if (dur != 82) begin
      failures++;
      $display("transform took %0d cycles (expected start 1 + 80 butterflies + done 1)", dur);
    end
    rms = 0.0;
    for (int k = 0; k < N; k++) rms += er[k] * er[k] + ei[k] * ei[k];
    rms = $sqrt(rms / N);
    tol = 1e-3 * rms + 4.0;
    for (int k = 0; k < N; k++) begin
      real gr, gi;
      rd_addr = 5'(inv ? k : br(k));
      #1;
      gr = real'(rd_re); gi = real'(rd_im);
      checks++;
      if ((gr - er[k]) > tol || (er[k] - gr) > tol || (gi - ei[k]) > tol || (ei[k] - gi) > tol) begin
        failures++;
        if (failures < 10) $display("%s bin %0d: %f %f want %f %f", inv ? "ifft" : "fft", k, gr, gi, er[k], ei[k]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 20; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = real'($urandom_range(2000000)) - 1000000.0;
        xi[n] = (f % 2) ? real'($urandom_range(2000000)) - 1000000.0 : 0.0;
      end
      run(1'b0);
      for (int n = 0; n < N; n++) begin
        xr[n] = real'($urandom_range(200000)) - 100000.0;
        xi[n] = real'($urandom_range(200000)) - 100000.0;
      end
      run(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
