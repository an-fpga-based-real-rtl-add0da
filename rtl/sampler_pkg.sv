// sampler_pkg: constants and types shared by the event sampler.
//
// A sample is 32 bits: the eight input channels in the upper byte and a
// 24-bit timestamp in the lower bits. The channel roles (four test data
// channels, two interrupt test channels, one SUT error channel and one
// timestamp-overflow channel) follow the document; their bit positions, the
// register map of the management slave and the state encoding of the
// control block are choices of this design.
package sampler_pkg;

  // Default sizes of a sample.
  localparam int unsigned CHANNELS = 8;            // input channels
  localparam int unsigned TSTAMP_W = 24;           // timestamp bits
  localparam int unsigned SAMPLE_W = CHANNELS + TSTAMP_W;  // 32-bit sample

  // Channel positions within the input byte.
  localparam int unsigned CH_TEST0 = 0;  // channels 0..3: test data
  localparam int unsigned CH_IRQ0  = 4;  // channels 4..5: interrupt tests
  localparam int unsigned CH_ERROR = 6;  // SUT signals an error
  localparam int unsigned CH_OVF   = 7;  // timestamp overflow (or external)

  // Management slave register map (word addresses).
  localparam logic [2:0] REG_CTRL   = 3'd0;
  localparam logic [2:0] REG_STATUS = 3'd1;
  localparam logic [2:0] REG_COUNT  = 3'd2;
  localparam logic [2:0] REG_ADDR   = 3'd3;
  localparam logic [2:0] REG_TSTAMP = 3'd4;
  localparam logic [2:0] REG_LEVEL  = 3'd5;

  // CTRL register bits. START, STOP and RESET are write-one pulses; the
  // others are stored configuration bits that read back.
  localparam int unsigned CTRL_START      = 0;
  localparam int unsigned CTRL_STOP       = 1;
  localparam int unsigned CTRL_RESET      = 2;
  localparam int unsigned CTRL_ERR_STOP   = 3;  // stop when the SUT error channel rises
  localparam int unsigned CTRL_CH7_EXT    = 4;  // channel 7 from a pin instead of overflow loopback
  localparam int unsigned CTRL_WRITE_HOLD = 5;  // keep samples in the FIFO, leave the SSRAM port free

  // STATUS register bits.
  localparam int unsigned ST_RUNNING    = 0;
  localparam int unsigned ST_HALTED     = 1;
  localparam int unsigned ST_SUT_ERROR  = 2;
  localparam int unsigned ST_FIFO_OVF   = 3;
  localparam int unsigned ST_MEM_FULL   = 4;
  localparam int unsigned ST_FIFO_EMPTY = 5;

  // Control block states.
  typedef enum logic [1:0] {
    CTL_IDLE = 2'd0,  // not sampling, ready to start
    CTL_RUN  = 2'd1,  // sampling
    CTL_HALT = 2'd2   // stopped by an error; needs a reset
  } ctl_state_e;

  // Why the control block halted (sticky until reset).
  typedef struct packed {
    logic mem_full;   // off-chip memory is full
    logic fifo_ovf;   // a changed sample met a full FIFO and was lost
    logic sut_error;  // the SUT raised its error channel
  } stop_cause_t;

endpackage
