// Testbench of profile_dpram: writes a random profile and header into the
// shadow bank, swaps, and reads both banks back through the registered port
// against reference copies; checks rd_loaded and that writes go to the
// shadow bank only.
module tb_profile_dpram;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [5:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic swap = 1'b0;
  logic active_bank, rd_bank = 1'b0, rd_loaded;
  logic [4:0] rd_addr = '0;
  logic [31:0] rd_data, hdr_o;

  int checks = 0, failures = 0;
  logic [31:0] refm [2][33];

  profile_dpram dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: %h expected %h", what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    chk(32'(rd_loaded), 0, "loaded after reset");
    for (int round = 0; round < 6; round++) begin
      int sb;
      sb = int'(!active_bank);
      for (int i = 0; i <= 32; i++) begin
        logic [31:0] d;
        d = $urandom;
        @(posedge clk);
        wr_en <= 1'b1; wr_addr <= 6'(i); wr_data <= d;
        refm[sb][i] = d;
      end
      @(posedge clk);
      wr_en <= 1'b0; swap <= 1'b1;
      @(posedge clk);
      swap <= 1'b0;
      @(negedge clk);
      chk(32'(active_bank), 32'(sb), "active bank");
      for (int bk = 0; bk < 2; bk++) begin
        if (round == 0 && bk != sb) continue;
        for (int i = 0; i < 32; i++) begin
          @(posedge clk);
          rd_bank <= 1'(bk); rd_addr <= 5'(i);
          @(posedge clk);
          @(negedge clk);
          chk(rd_data, refm[bk][i], "rd_data");
          chk(hdr_o, refm[bk][32], "header");
          chk(32'(rd_loaded), 1, "loaded");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
