// Time-domain digital block of a one-way 2x2 MIMO channel.
//
// Four SISO channels h11, h12, h21, h22, each a sparse FIR filter (15-sample
// span, 9 multipliers) with its own double-buffered coefficient store, and
// one final adder plus 17-to-14-bit truncation per receive antenna:
//   dac[r] = trunc( h_r1 * x_1 + h_r2 * x_2 ),  r = 1, 2.
// Channel index c = 2*(r-1) + (t-1): 0 = h11, 1 = h12, 2 = h21, 3 = h22
// (h_rt runs from transmit input t to receive output r).
//
// Profile reload: the host writes 16-bit words at addr = {c[1:0], word[6:0]};
// words 0..8 are the tap coefficients (Q2.14), word 9 the header whose bits
// [1:0] give the truncation window of receive output r when written to
// channel 2*(r-1). swap makes all four new profiles active together.
// The sliding window truncation is the default here (BRUTAL = 0).
//
// Timing: one sample per clock when adc_valid is high every cycle; the DAC
// sample appears LATENCY = 6 cycles after its ADC sample (FIR 4, final
// adder 1, truncation 1).
module mimo_time_domain
  import chsim_pkg::*;
#(
  parameter bit BRUTAL = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_valid,
  input  sample_t            adc_x [2],
  input  logic               wr_en,
  input  logic [8:0]         wr_addr,
  input  logic [15:0]        wr_data,
  input  logic               swap,
  output logic               dac_valid,
  output dac_t               dac [2],
  output logic [SHIFT_W-1:0] amp_k [2],
  output logic [1:0]         sat
);

  localparam int unsigned WORDS = TGN_NPATHS + 1;

  logic [COEF_W-1:0] words [4][WORDS];
  siso_t             ych   [4];
  logic [3:0]        yv;
  logic [3:0]        bank;
  logic [1:0]        dv;

  for (genvar c = 0; c < 4; c++) begin : g_ch
    coef_t coef [TGN_NPATHS];

    coef_bank #(.WORDS(WORDS), .W(COEF_W)) u_bank (
      .clk, .rst_n,
      .wr_en      (wr_en && (wr_addr[8:7] == 2'(c)) && (wr_addr[6:4] == 3'd0)),
      .wr_addr    (wr_addr[$clog2(WORDS)-1:0]),
      .wr_data,
      .swap,
      .coef_o     (words[c]),
      .active_bank(bank[c])
    );

    always_comb
      for (int k = 0; k < int'(TGN_NPATHS); k++) coef[k] = coef_t'(words[c][k]);

    fir14_9 u_fir (
      .clk, .rst_n,
      .x_valid(adc_valid),
      .x      (adc_x[c % 2]),
      .coef,
      .y_valid(yv[c]),
      .y      (ych[c])
    );
  end

  for (genvar r = 0; r < 2; r++) begin : g_rx
    rx_combiner #(.BRUTAL(BRUTAL)) u_comb (
      .clk, .rst_n,
      .a_valid  (yv[2*r]),
      .a        (ych[2*r]),
      .b        (ych[2*r+1]),
      .shift    (words[2*r][WORDS-1][SHIFT_W-1:0]),
      .dac_valid(dv[r]),
      .dac      (dac[r]),
      .amp_k    (amp_k[r]),
      .sat      (sat[r])
    );
  end

  assign dac_valid = dv[0];

  // The four SISO outputs and the two DAC outputs stay aligned.
  a_siso_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (yv == 4'b0000) || (yv == 4'b1111));
  a_dac_aligned: assert property (@(posedge clk) disable iff (!rst_n) dv[0] == dv[1]);

  // All four stores swap together.
  a_banks_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (bank == 4'b0000) || (bank == 4'b1111));

endmodule
