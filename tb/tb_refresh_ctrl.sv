// Testbench of refresh_ctrl at PERIOD = 25: tick must come exactly every
// 25 cycles, a commit must lead to exactly one swap at the next tick (two
// commits in a period still one), and a tick without a commit must be held.
module tb_refresh_ctrl;
  localparam int P = 25;
  logic clk = 1'b0, rst_n = 1'b0;
  logic commit = 1'b0;
  logic tick, swap, pending, held;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  refresh_ctrl #(.PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_tick = -1;
  bit want = 1'b0;
  int nswap = 0, nheld = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tick) begin
      if (last_tick >= 0) begin
        checks++;
        if (int'(cyc) - last_tick != P) begin
          failures++;
          $display("tick period %0d", int'(cyc) - last_tick);
        end
      end
      last_tick = int'(cyc);
      checks++;
      if (swap !== want || held !== !want) begin
        failures++;
        $display("at tick: swap %0d held %0d want %0d", swap, held, want);
      end
      if (swap) nswap++;
      if (held) nheld++;
      want = 1'b0;
    end else begin
      checks++;
      if (swap || held) begin
        failures++;
        $display("swap/held outside a tick");
      end
    end
    // commit seen by the DUT at this edge (it was driven before it)
    if (commit) want = 1'b1;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      commit <= ($urandom_range(40) == 0);
    end
    checks++;
    if (nswap == 0 || nheld == 0) begin
      failures++;
      $display("swaps %0d held %0d", nswap, nheld);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
