// Time-domain SISO channel: sparse FIR filter "FIR 14 with 9 multipliers".
//
// y(i) = sum_{k=0}^{NTAPS-1} h(k) * x(i - d_k)
//
// A delay line holds the last MAX_DELAY+1 input samples (delays 0..14 for
// TGn model B); only the NTAPS positions named in TAP_DELAY feed a
// multiplier, so the filter spans 15 samples with 9 multipliers. The
// coefficients come in as a parallel vector from a double-buffered profile
// store and may change between any two samples, which is what lets the
// filter follow a time-varying channel (the reason a fixed vendor MAC FIR
// was not used). The tap delays, the 9 multipliers and the reloadable
// coefficients follow the architecture; the pipeline depth and the number
// formats are this design's choice.
//
// Formats: x Q1.13 (14 bits), h Q2.14 (16 bits), y Q3.13 (16 bits), rounded
// to nearest and saturated.
//
// Timing: the delay line advances when x_valid is high. The pipeline runs
// every cycle: products are registered one cycle after the delay line,
// the sum one cycle later and the rounded output one cycle after that, so
// y_valid follows x_valid by LATENCY = 4 cycles. With x_valid high every
// cycle the filter takes one sample per clock.
module fir14_9
  import chsim_pkg::*;
#(
  parameter int unsigned NTAPS = 9,
  parameter int unsigned MAX_DELAY = TGN_MAX_DELAY,
  parameter int unsigned TAP_DELAY [NTAPS] = TGN_B_DELAYS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  sample_t x,
  input  coef_t   coef [NTAPS],
  output logic    y_valid,
  output siso_t   y
);

  localparam int unsigned PROD_W = ADC_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(NTAPS + 1);
  localparam int unsigned SHIFT  = COEF_FRAC;  // Q3.27 products -> Q3.13 output

  sample_t                    dline [MAX_DELAY+1];
  logic signed [PROD_W-1:0]   prod  [NTAPS];
  logic signed [ACC_W-1:0]    acc;
  logic [2:0]                 vpipe;

  // Delay line: dline[d] = x(i-d) once the newest sample is in dline[0].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d <= int'(MAX_DELAY); d++) dline[d] <= '0;
    end else if (x_valid) begin
      dline[0] <= x;
      for (int d = 1; d <= int'(MAX_DELAY); d++) dline[d] <= dline[d-1];
    end
  end

  // One multiplier per non-null tap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAPS); k++) prod[k] <= '0;
    end else begin
      for (int k = 0; k < int'(NTAPS); k++)
        prod[k] <= PROD_W'(dline[TAP_DELAY[k]]) * PROD_W'(coef[k]);
    end
  end

  // Adder over the products.
  logic signed [ACC_W-1:0] psum;
  always_comb begin
    psum = '0;
    for (int k = 0; k < int'(NTAPS); k++) psum += ACC_W'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= psum;
  end

  // Round to nearest and saturate to the SISO output width.
  logic signed [ACC_W-1:0] rounded;
  always_comb rounded = (acc + ACC_W'(1 << (SHIFT - 1))) >>> SHIFT;

  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((1 << (SISO_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] YMIN = -ACC_W'(1 << (SISO_W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
      vpipe   <= '0;
    end else begin
      vpipe   <= {vpipe[1:0], x_valid};
      y_valid <= vpipe[2];
      if (rounded > YMAX)      y <= YMAX[SISO_W-1:0];
      else if (rounded < YMIN) y <= YMIN[SISO_W-1:0];
      else                     y <= rounded[SISO_W-1:0];
    end
  end

endmodule
