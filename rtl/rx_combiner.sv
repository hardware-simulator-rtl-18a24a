// Final adder and DAC truncation of one receive antenna.
//
// A receive antenna sees the sum of the two SISO channels that end on it:
// y_r = h_r1 * x_1 + h_r2 * x_2. This block adds the two 16-bit SISO outputs
// into the 17-bit final sum (registered) and passes it through the sliding
// window truncation to the 14-bit DAC sample.
//
// Timing: the sum is registered when a_valid is high (both SISO outputs are
// aligned by construction); the DAC sample follows two cycles after
// a_valid.
module rx_combiner
  import chsim_pkg::*;
#(
  parameter bit BRUTAL = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               a_valid,
  input  siso_t              a,
  input  siso_t              b,
  input  logic [SHIFT_W-1:0] shift,
  output logic               dac_valid,
  output dac_t               dac,
  output logic [SHIFT_W-1:0] amp_k,
  output logic               sat
);

  sum_t sum;
  logic sum_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= a_valid;
      if (a_valid) sum <= SUM_W'(a) + SUM_W'(b);
    end
  end

  sliding_trunc #(.IN_W(SUM_W), .OUT_W(DAC_W), .BRUTAL(BRUTAL)) u_trunc (
    .clk, .rst_n,
    .in_valid (sum_valid),
    .din      (sum),
    .shift,
    .out_valid(dac_valid),
    .dout     (dac),
    .amp_k,
    .sat
  );

endmodule
