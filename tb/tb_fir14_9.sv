// Testbench of fir14_9: random coefficients (changed now and then, also to
// saturating values) and a random input with gaps in x_valid. Each output is
// compared with a bit-exact model of y(i) = sum h_k x(i - d_k), rounded to
// Q3.13 and saturated, built here from the input history, and the latency
// from x_valid to y_valid is checked to be 4 cycles.
module tb_fir14_9;
  import chsim_pkg::*;

  localparam int DLY [9] = '{0, 2, 4, 5, 7, 9, 11, 13, 14};

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0;
  sample_t x = '0;
  coef_t coef [9];
  logic y_valid;
  siso_t y;

  int checks = 0, failures = 0, nsat = 0;
  int unsigned cyc = 0;

  fir14_9 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  int expq [$];
  int tq [$];
  bit pend = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pend) begin
        longint acc;
        longint r;
        acc = 0;
        for (int k = 0; k < 9; k++)
          if (DLY[k] < hist.size()) acc += longint'(hist[DLY[k]]) * longint'(coef[k]);
        r = (acc + 8192) >>> 14;
        if (r > 32767) begin r = 32767; nsat++; end
        if (r < -32768) begin r = -32768; nsat++; end
        expq.push_back(int'(r));
      end
      pend = x_valid;
      if (x_valid) begin
        hist.push_front(int'(x));
        tq.push_back(int'(cyc));
      end
      if (y_valid) begin
        int e, t0;
        checks++;
        e = expq.pop_front();
        t0 = tq.pop_front();
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("y=%0d expected %0d", y, e);
        end
        checks++;
        if (int'(cyc) - t0 != 4) begin
          failures++;
          if (failures < 10) $display("latency %0d", int'(cyc) - t0);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 9; k++) coef[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      x_valid <= ($urandom_range(9) != 0);
      x <= sample_t'($urandom);
      if ((i % 200) == 0)
        for (int k = 0; k < 9; k++)
          coef[k] <= (i == 1000) ? coef_t'(16'h7fff) :
                     (i == 1200) ? coef_t'(16'h8000) :
                     coef_t'($signed(16'($urandom)) >>> 2);
    end
    @(posedge clk);
    x_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nsat == 0) begin
      failures++;
      $display("left %0d expected outputs, %0d saturations", expq.size(), nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
