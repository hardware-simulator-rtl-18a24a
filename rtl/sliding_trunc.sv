// Sliding window truncation of the final adder output for the 14-bit DAC.
//
// The 17-bit sum is cut to 14 bits. Brutal truncation keeps the 14 most
// significant bits (window position shift = 3); small signals then lose
// their resolution and can come out as zero. The sliding window instead
// keeps the 14 bits starting at bit `shift`, so a small output keeps its
// effective bits. A reconfigurable analog amplifier after the DAC
// multiplies by 2^shift to restore the level: amp_k reports the position in
// use. shift must not exceed IN_W - OUT_W. Values that do not fit the chosen window saturate (sat = 1).
//
// The window idea and the 17 -> 14 bit sizes follow the architecture. How
// the window position is chosen is not given; here it is set per profile
// by the host (header word), and BRUTAL = 1 fixes it at the top.
//
// Timing: one register stage, out_valid follows in_valid by one cycle.
module sliding_trunc
  import chsim_pkg::*;
#(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned OUT_W = 14,
  parameter bit          BRUTAL = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic signed [IN_W-1:0]       din,
  input  logic [$clog2(IN_W-OUT_W+1)-1:0] shift,
  output logic                         out_valid,
  output logic signed [OUT_W-1:0]      dout,
  output logic [$clog2(IN_W-OUT_W+1)-1:0] amp_k,
  output logic                         sat
);

  localparam int unsigned KMAX = IN_W - OUT_W;
  localparam logic signed [IN_W-1:0] OMAX = IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] OMIN = -IN_W'(1 << (OUT_W - 1));

  logic [$clog2(KMAX+1)-1:0] k;
  logic signed [IN_W-1:0]    shifted;

  always_comb begin
    k = BRUTAL ? ($clog2(KMAX+1))'(KMAX) : shift;
    shifted = din >>> k;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
      amp_k     <= '0;
      sat       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      amp_k     <= k;
      if (in_valid) begin
        if (shifted > OMAX) begin
          dout <= OMAX[OUT_W-1:0];
          sat  <= 1'b1;
        end else if (shifted < OMIN) begin
          dout <= OMIN[OUT_W-1:0];
          sat  <= 1'b1;
        end else begin
          dout <= shifted[OUT_W-1:0];
          sat  <= 1'b0;
        end
      end
    end
  end

endmodule
