// Testbench of sliding_trunc: random 17-bit sums (small and large) and
// window positions through a sliding instance and a brutal instance; every
// output is compared with floor(din / 2^k) clipped to 14 bits, k = shift
// (sliding) or 3 (brutal), together with sat and amp_k, one cycle later.
module tb_sliding_trunc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [16:0] din = '0;
  logic [1:0] shift = '0;
  logic out_valid, sat, out_valid_b, sat_b;
  logic signed [13:0] dout, dout_b;
  logic [1:0] amp_k, amp_k_b;

  int checks = 0, failures = 0, nsat = 0;

  sliding_trunc dut (.*);
  sliding_trunc #(.BRUTAL(1'b1)) dut_b (.clk, .rst_n, .in_valid, .din, .shift,
    .out_valid(out_valid_b), .dout(dout_b), .amp_k(amp_k_b), .sat(sat_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int v, int k, output bit s);
    int r = v >>> k;
    s = 1'b0;
    if (r > 8191) begin r = 8191; s = 1'b1; end
    if (r < -8192) begin r = -8192; s = 1'b1; end
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int v, k, e, eb;
      bit s, sb;
      v = (i % 2) ? int'($signed(17'($urandom))) : int'($urandom_range(4000)) - 2000;
      k = int'($urandom_range(3));
      @(posedge clk);
      in_valid <= 1'b1; din <= 17'(v); shift <= 2'(k);
      @(posedge clk);
      in_valid <= 1'b0;
      @(negedge clk);
      e = model(v, k, s);
      eb = model(v, 3, sb);
      if (s) nsat++;
      checks++;
      if (!out_valid || int'(dout) != e || sat != s || int'(amp_k) != k) begin
        failures++;
        if (failures < 10) $display("v=%0d k=%0d: got %0d sat %0d, want %0d sat %0d", v, k, dout, sat, e, s);
      end
      checks++;
      if (!out_valid_b || int'(dout_b) != eb || sat_b != sb || amp_k_b != 2'd3) begin
        failures++;
        if (failures < 10) $display("brutal v=%0d: got %0d want %0d", v, dout_b, eb);
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
