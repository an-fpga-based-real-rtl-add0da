// timestamp_counter: free-running timestamp at the sampling clock.
//
// The counter is incremented on every clock cycle and wraps after 2**TS_W
// cycles. So that a wrap can be stored as an event like any other, the
// counter also drives an overflow loopback bit that toggles on each wrap:
// fed into input channel 7, it makes the first sample after a wrap differ
// from the one before. The 24-bit width and the storing of overflows as
// events follow the document; using a toggle (one event per wrap, rather
// than a pulse that would give two) is this design's choice.
//
// Timing: ts and ovf_toggle are registers. When ts goes from all-ones to
// zero, ovf_toggle flips on the same edge. clear (synchronous) and rst_n (asynchronous) both
// return ts and ovf_toggle to zero.
module timestamp_counter #(
  parameter int unsigned TS_W = 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  output logic [TS_W-1:0] ts,
  output logic            ovf_toggle
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts         <= '0;
      ovf_toggle <= 1'b0;
    end else if (clear) begin
      ts         <= '0;
      ovf_toggle <= 1'b0;
    end else begin
      ts     <= ts + 1'b1;
      if (&ts) ovf_toggle <= ~ovf_toggle;
    end
  end

endmodule
