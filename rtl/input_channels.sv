// input_channels: the eight input channels, combined with the timestamp.
//
// Seven channels come from the system under test (four test data channels,
// two interrupt test channels and the SUT error channel). Channel 7 carries
// the timestamp overflow loopback, or, when ch7_ext is set, an eighth
// external pin. The pins are asynchronous to the sampling clock, so each
// passes a two-flop synchronizer; the multiplexed channels are then
// registered together with the current timestamp into one sample:
// sample = {channels[7:0], timestamp[23:0]}.
//
// The channel roles, the loopback option and the 8+24 bit split follow the
// document. The synchronizer, the bit order within the sample and the
// runtime selection of channel 7 are this design's choices.
//
// Timing: a pin change appears in the sample three clock edges later
// (two synchronizer stages and the sample register), a fixed latency.
module input_channels #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned TS_W = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IN_W-2:0]      sut_in,      // channels 0..IN_W-2 from the SUT
  input  logic                 ext_ch7,     // optional external source of channel 7
  input  logic                 ch7_ext,     // 1: channel 7 from ext_ch7, 0: overflow loopback
  input  logic [TS_W-1:0]      ts,          // timestamp counter
  input  logic                 ovf_toggle,  // overflow loopback from the counter
  output logic [IN_W+TS_W-1:0] sample
);

  logic [IN_W-1:0] sync1, sync2;
  logic [IN_W-1:0] channels;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= {ext_ch7, sut_in};
      sync2 <= sync1;
    end
  end

  always_comb begin
    channels           = sync2;
    channels[IN_W-1]   = ch7_ext ? sync2[IN_W-1] : ovf_toggle;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= '0;
    else        sample <= {channels, ts};
  end

endmodule
