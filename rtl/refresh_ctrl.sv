// Profile refresh controller.
//
// The time-varying channel is a sequence of impulse-response profiles, one
// per coherence interval: the refresh frequency is 18.18 Hz, a period of
// about 55 ms, in which the host must load the next profile of all four
// SISO channels. This block counts PERIOD clock cycles per refresh period
// (9,900,990 cycles at 180 MHz) and emits tick once per period. The host
// marks a completely written profile with a commit pulse; at the next tick
// the pending profile becomes active (swap pulse). A tick with nothing
// pending keeps the current profile (held). A second commit before the tick
// is harmless.
//
// The 18.18 Hz rate follows the channel model; the commit/tick handshake is
// this design's choice.
//
// Timing: tick and swap are one-cycle pulses, registered.
module refresh_ctrl #(
  parameter int unsigned PERIOD = 9_900_990
) (
  input  logic clk,
  input  logic rst_n,
  input  logic commit,
  output logic tick,
  output logic swap,
  output logic pending,
  output logic held
);

  logic [$clog2(PERIOD)-1:0] cnt;
  logic                      last;

  assign last = (32'(cnt) == PERIOD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      tick    <= 1'b0;
      swap    <= 1'b0;
      held    <= 1'b0;
      pending <= 1'b0;
    end else begin
      cnt  <= last ? '0 : cnt + 1'b1;
      tick <= last;
      swap <= last && (pending || commit);
      held <= last && !(pending || commit);
      if (last)        pending <= 1'b0;
      else if (commit) pending <= 1'b1;
    end
  end

endmodule
