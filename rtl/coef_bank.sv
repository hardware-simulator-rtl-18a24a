// Double-buffered coefficient store of one time-domain SISO channel.
//
// A profile is WORDS words of W bits: the NTAPS = 9 FIR coefficients
// (words 0..8) followed by one header word (word 9) whose low two bits set
// the position of the output truncation window. That makes the (9+1) words
// of 16 bits per SISO channel that the host sends for every profile.
//
// The host writes into the shadow bank at any time; the filter always sees
// the whole active bank on coef_o. A one-cycle pulse on swap exchanges the
// banks, so all coefficients of a profile take effect on the same sample.
// The bank split and the header meaning are this design's choice; the
// word count and width follow the profile size of the time-domain design.
//
// Timing: a write lands at the clock edge; coef_o changes one cycle after
// swap. Reset clears both banks.
module coef_bank #(
  parameter int unsigned WORDS = 10,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     swap,
  output logic [W-1:0]             coef_o [WORDS],
  output logic                     active_bank
);

  logic [W-1:0] bank [2][WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < int'(WORDS); i++) bank[b][i] <= '0;
      active_bank <= 1'b0;
    end else begin
      if (wr_en && (32'(wr_addr) < WORDS)) bank[~active_bank][wr_addr] <= wr_data;
      if (swap) active_bank <= ~active_bank;
    end
  end

  always_comb
    for (int i = 0; i < int'(WORDS); i++) coef_o[i] = bank[active_bank][i];

endmodule
