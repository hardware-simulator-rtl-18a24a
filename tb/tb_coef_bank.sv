// Testbench of coef_bank: random writes into the shadow bank must not show
// on coef_o until swap; after swap coef_o must equal a reference copy of the
// written profile, and words written outside the profile must be ignored.
module tb_coef_bank;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [3:0] wr_addr = '0;
  logic [15:0] wr_data = '0;
  logic swap = 1'b0;
  logic [15:0] coef_o [10];
  logic active_bank;

  int checks = 0, failures = 0;
  logic [15:0] act [10], shd [10];

  coef_bank dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (coef_o[i] !== act[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: %h expected %h", i, coef_o[i], act[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 10; i++) begin act[i] = '0; shd[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    compare();
    for (int round = 0; round < 50; round++) begin
      for (int n = 0; n < 30; n++) begin
        logic [3:0] a;
        logic [15:0] d;
        a = 4'($urandom_range(15));
        d = 16'($urandom);
        @(posedge clk);
        wr_en <= 1'b1; wr_addr <= a; wr_data <= d;
        if (a < 10) shd[a] = d;
        @(negedge clk);
        compare();
      end
      @(posedge clk);
      wr_en <= 1'b0; swap <= 1'b1;
      @(posedge clk);
      swap <= 1'b0;
      begin
        logic [15:0] t [10];
        t = act; act = shd; shd = t;
      end
      @(negedge clk);
      compare();
      checks++;
      if (active_bank !== 1'(round + 1)) begin
        failures++;
        $display("active bank %0d after %0d swaps", active_bank, round + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
