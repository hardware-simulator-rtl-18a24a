// Dual-port, double-buffered profile RAM of one frequency-domain SISO
// channel.
//
// A frequency profile is DEPTH = 32 complex coefficients H[k] (one 32-bit
// word {re, im} each) plus one header word, the (32+1) words of 32 bits per
// SISO channel loaded from the host. The coefficients sit in a RAM of two
// banks: port A (host) writes into the shadow bank, port B (datapath) reads
// any bank, so the datapath can finish a block on the bank it started with
// while the next profile is loaded. The header word (address DEPTH) is kept
// in a register per bank. swap exchanges the banks (active_bank toggles).
//
// The dual-port RAM holding the reloaded profiles follows the architecture;
// the bank split and header use are this design's choice.
//
// A bank counts as loaded once a swap has made it active; rd_loaded tells
// the datapath whether rd_bank holds a profile yet (after reset neither
// does, and the RAM contents are undefined).
//
// Timing: rd_data is registered (one cycle after rd_addr/rd_bank);
// hdr_o and rd_loaded belong to rd_bank and are combinational.
module profile_dpram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(DEPTH+1)-1:0] wr_addr,
  input  logic [W-1:0]               wr_data,
  input  logic                       swap,
  output logic                       active_bank,
  input  logic                       rd_bank,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output logic [W-1:0]               rd_data,
  output logic [W-1:0]               hdr_o,
  output logic                       rd_loaded
);

  logic [W-1:0] mem [2*DEPTH];
  logic [W-1:0] hdr [2];
  logic [1:0]   loaded;

  // Port A: host writes into the shadow bank.
  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH))
      mem[{~active_bank, wr_addr[$clog2(DEPTH)-1:0]}] <= wr_data;
  end

  // Port B: registered read.
  always_ff @(posedge clk) rd_data <= mem[{rd_bank, rd_addr}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_bank <= 1'b0;
      hdr[0]      <= '0;
      hdr[1]      <= '0;
      loaded      <= '0;
    end else begin
      if (wr_en && (32'(wr_addr) == DEPTH)) hdr[~active_bank] <= wr_data;
      if (swap) begin
        active_bank          <= ~active_bank;
        loaded[~active_bank] <= 1'b1;
      end
    end
  end

  assign hdr_o     = hdr[rd_bank];
  assign rd_loaded = loaded[rd_bank];

endmodule
