// Frequency-domain digital block of a one-way 2x2 MIMO channel.
//
// Four frequency-domain SISO channels (block of 16 + tail of 16 zeros,
// 32-point FFT, product with the stored H[k], 32-point IFFT, overlap-add),
// one per sub-channel h11, h12, h21, h22, and per receive antenna a final
// adder and truncation to the 14-bit DAC:
//   dac[r] = trunc( h_r1 * x_1 + h_r2 * x_2 ),  r = 1, 2.
// Channel index c = 2*(r-1) + (t-1) as in the time-domain block.
//
// Profile reload: the host writes 32-bit words at addr = {c[1:0], word[6:0]};
// words 0..31 are H[k] = {re, im} (Q4.12), word 32 the header ([1:0]:
// truncation window of output r, taken from channel 2*(r-1)). swap
// exchanges the banks of all four channels; each channel picks the new
// profile up at its next block. Brutal truncation is the default here
// (BRUTAL = 1), the simpler choice that loses almost nothing for this
// architecture.
//
// Timing: the four channels run in lockstep on the same adc_valid; an
// output sample leaves with every input sample, 32 samples plus 3 cycles
// after the input sample it belongs to. adc_valid must not come more often
// than once every 16 cycles (overrun flags a violation).
module mimo_freq_domain
  import chsim_pkg::*;
#(
  parameter bit BRUTAL = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_valid,
  input  sample_t            adc_x [2],
  input  logic               wr_en,
  input  logic [8:0]         wr_addr,
  input  logic [31:0]        wr_data,
  input  logic               swap,
  output logic               dac_valid,
  output dac_t               dac [2],
  output logic [SHIFT_W-1:0] amp_k [2],
  output logic [1:0]         sat,
  output logic               overrun
);

  siso_t       ych  [4];
  logic [31:0] yhdr [4];
  logic [3:0]  yv, ovr, bdone;
  logic [1:0]  dv;

  for (genvar c = 0; c < 4; c++) begin : g_ch
    freq_siso u_siso (
      .clk, .rst_n,
      .x_valid (adc_valid),
      .x       (adc_x[c % 2]),
      .wr_en   (wr_en && (wr_addr[8:7] == 2'(c)) && !wr_addr[6]),
      .wr_addr (wr_addr[5:0]),
      .wr_data,
      .swap,
      .y_valid (yv[c]),
      .y       (ych[c]),
      .y_hdr   (yhdr[c]),
      .overrun (ovr[c]),
      .blk_done(bdone[c])
    );
  end

  for (genvar r = 0; r < 2; r++) begin : g_rx
    rx_combiner #(.BRUTAL(BRUTAL)) u_comb (
      .clk, .rst_n,
      .a_valid  (yv[2*r]),
      .a        (ych[2*r]),
      .b        (ych[2*r+1]),
      .shift    (yhdr[2*r][SHIFT_W-1:0]),
      .dac_valid(dv[r]),
      .dac      (dac[r]),
      .amp_k    (amp_k[r]),
      .sat      (sat[r])
    );
  end

  assign dac_valid = dv[0];
  assign overrun   = |ovr;

  // The four SISO outputs and the two DAC outputs stay aligned.
  a_siso_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (yv == 4'b0000) || (yv == 4'b1111));
  a_dac_aligned: assert property (@(posedge clk) disable iff (!rst_n) dv[0] == dv[1]);

  // The four channels process their blocks in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (bdone == 4'b0000) || (bdone == 4'b1111));

endmodule
