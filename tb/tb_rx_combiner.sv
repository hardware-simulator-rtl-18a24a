// Testbench of rx_combiner: random pairs of 16-bit SISO outputs and window
// positions; the DAC sample two cycles later must equal floor((a+b)/2^k)
// clipped to 14 bits, computed here.
module tb_rx_combiner;
  import chsim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_valid = 1'b0;
  siso_t a = '0, b = '0;
  logic [1:0] shift = '0;
  logic dac_valid, sat;
  dac_t dac;
  logic [1:0] amp_k;

  int checks = 0, failures = 0;

  rx_combiner dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int va, vb, k, r;
      bit s;
      va = (i % 3 == 0) ? int'($signed(16'($urandom))) : int'($urandom_range(3000)) - 1500;
      vb = (i % 3 == 0) ? int'($signed(16'($urandom))) : int'($urandom_range(3000)) - 1500;
      k = int'($urandom_range(3));
      @(posedge clk);
      a_valid <= 1'b1; a <= siso_t'(va); b <= siso_t'(vb); shift <= 2'(k);
      @(posedge clk);
      a_valid <= 1'b0;
      @(posedge clk);
      @(negedge clk);
      r = (va + vb) >>> k;
      s = 1'b0;
      if (r > 8191) begin r = 8191; s = 1'b1; end
      if (r < -8192) begin r = -8192; s = 1'b1; end
      checks++;
      if (!dac_valid || int'(dac) != r || sat != s || int'(amp_k) != k) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d k=%0d: got %0d want %0d", va, vb, k, dac, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
