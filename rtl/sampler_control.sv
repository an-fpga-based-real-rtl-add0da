// sampler_control: the control block on the sampling data path.
//
// It decides which changed samples enter the FIFO ("sampler enabled?") and
// keeps the sampler's state: IDLE (not sampling), RUN (sampling) and HALT
// (stopped by an error). Software starts and stops sampling through the
// management slave. While running, the block stops by itself when
//   - the SUT raises its error channel (if err_stop_en is set): the changed
//     sample that carries the error is still stored, then sampling stops;
//   - a changed sample finds the FIFO full: it is lost, and sampling stops
//     so that the record is never silently incomplete;
//   - the off-chip memory is full.
// Each cause is kept as a sticky flag. A reset request (soft_reset) is the
// recovery mechanism: it pulses clear_o to empty the FIFO and zero the
// counters of the core, clears the flags and returns to IDLE. Leaving HALT
// needs a reset; start is ignored there.
//
// The document gives the start/stop function, stopping on errors and the
// reset; which errors count, the sticky flags and the HALT state are this
// design's choices.
//
// Timing: push is combinational from changed/fifo_full and the state, so
// a changed sample is written into the FIFO in the cycle it is presented.
// A start or stop takes effect from the next cycle.
module sampler_control
  import sampler_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  parameter int unsigned TS_W = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the management slave (one-cycle pulses) and settings
  input  logic                 start,
  input  logic                 stop,
  input  logic                 soft_reset,
  input  logic                 err_stop_en,
  // from the compare stage
  input  logic [IN_W+TS_W-1:0] sample_i,
  input  logic                 changed,
  // FIFO write side
  input  logic                 fifo_full,
  output logic                 push,
  output logic [IN_W+TS_W-1:0] push_data,
  // off-chip memory full, from the sample counter
  input  logic                 mem_full,
  // state
  output logic                 clear_o,
  output ctl_state_e           state,
  output stop_cause_t          cause
);

  localparam int unsigned ERR_BIT = TS_W + CH_ERROR;

  logic        running;
  logic        lost;
  logic        err_seen;
  ctl_state_e  state_d;

  assign running   = (state == CTL_RUN);
  assign push      = running && changed && !fifo_full;
  assign push_data = sample_i;
  assign lost      = running && changed && fifo_full;
  assign err_seen  = push && err_stop_en && sample_i[ERR_BIT];
  assign clear_o   = soft_reset;

  always_comb begin
    state_d = state;
    unique case (state)
      CTL_IDLE: if (start && !mem_full) state_d = CTL_RUN;
      CTL_RUN: begin
        if (lost || err_seen || mem_full) state_d = CTL_HALT;
        else if (stop)                    state_d = CTL_IDLE;
      end
      CTL_HALT: state_d = CTL_HALT;
      default:  state_d = CTL_IDLE;
    endcase
    if (soft_reset) state_d = CTL_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CTL_IDLE;
      cause <= '0;
    end else begin
      state <= state_d;
      if (soft_reset) begin
        cause <= '0;
      end else begin
        if (err_seen)            cause.sut_error <= 1'b1;
        if (lost)                cause.fifo_ovf  <= 1'b1;
        if (running && mem_full) cause.mem_full  <= 1'b1;
      end
    end
  end

endmodule
