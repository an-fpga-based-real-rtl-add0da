// mgmt_regs: management interface of the sampler, a memory-mapped slave.
//
// Through it the control software starts, stops and resets the sampler,
// sets its options and reads its state. Registers (32-bit words):
//   0 CTRL    write: bit0 START, bit1 STOP, bit2 RESET (pulses, read as 0);
//             read/write: bit3 ERR_STOP (stop on SUT error), bit4 CH7_EXT
//             (channel 7 from its pin instead of the overflow loopback),
//             bit5 WRITE_HOLD (keep samples in the FIFO).
//   1 STATUS  read: bit0 running, bit1 halted, bit2 SUT error, bit3 FIFO
//             overflow, bit4 memory full, bit5 FIFO empty.
//   2 COUNT   read: samples written to the off-chip memory.
//   3 ADDR    read: address of the last launched write.
//   4 TSTAMP  read: current timestamp.
//   5 LEVEL   read: samples waiting in the FIFO.
// The document gives the interface's purpose (start, stop, reset and
// monitoring from the CPU); the register map, the reset values (ERR_STOP
// set, the others clear) and the timing are this design's choices.
//
// Timing: writes take effect on the clock edge that accepts them, so a
// command pulse is high for the following cycle. Reads have a fixed latency
// of one cycle: s_readdata and s_readdatavalid are registered. The slave
// never waits.
module mgmt_regs
  import sampler_pkg::*;
#(
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned TS_W   = 24,
  parameter int unsigned LVL_W  = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  // memory-mapped slave
  input  logic [2:0]        s_address,
  input  logic              s_read,
  input  logic              s_write,
  input  logic [31:0]       s_writedata,
  output logic [31:0]       s_readdata,
  output logic              s_readdatavalid,
  // commands and settings
  output logic              start,
  output logic              stop,
  output logic              soft_reset,
  output logic              err_stop_en,
  output logic              ch7_ext,
  output logic              write_hold,
  // state to report
  input  ctl_state_e        state,
  input  stop_cause_t       cause,
  input  logic              fifo_empty,
  input  logic [LVL_W-1:0]  fifo_level,
  input  logic [CNT_W-1:0]  count,
  input  logic [ADDR_W-1:0] addr,
  input  logic [TS_W-1:0]   ts
);

  logic        wr_ctrl;
  logic [31:0] rd_word;

  assign wr_ctrl = s_write && (s_address == REG_CTRL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start       <= 1'b0;
      stop        <= 1'b0;
      soft_reset  <= 1'b0;
      err_stop_en <= 1'b1;
      ch7_ext     <= 1'b0;
      write_hold  <= 1'b0;
    end else begin
      start      <= wr_ctrl && s_writedata[CTRL_START];
      stop       <= wr_ctrl && s_writedata[CTRL_STOP];
      soft_reset <= wr_ctrl && s_writedata[CTRL_RESET];
      if (wr_ctrl) begin
        err_stop_en <= s_writedata[CTRL_ERR_STOP];
        ch7_ext     <= s_writedata[CTRL_CH7_EXT];
        write_hold  <= s_writedata[CTRL_WRITE_HOLD];
      end
    end
  end

  always_comb begin
    rd_word = '0;
    unique case (s_address)
      REG_CTRL: begin
        rd_word[CTRL_ERR_STOP]   = err_stop_en;
        rd_word[CTRL_CH7_EXT]    = ch7_ext;
        rd_word[CTRL_WRITE_HOLD] = write_hold;
      end
      REG_STATUS: begin
        rd_word[ST_RUNNING]    = (state == CTL_RUN);
        rd_word[ST_HALTED]     = (state == CTL_HALT);
        rd_word[ST_SUT_ERROR]  = cause.sut_error;
        rd_word[ST_FIFO_OVF]   = cause.fifo_ovf;
        rd_word[ST_MEM_FULL]   = cause.mem_full || count[CNT_W-1];
        rd_word[ST_FIFO_EMPTY] = fifo_empty;
      end
      REG_COUNT:  rd_word = 32'(count);
      REG_ADDR:   rd_word = 32'(addr);
      REG_TSTAMP: rd_word = 32'(ts);
      REG_LEVEL:  rd_word = 32'(fifo_level);
      default:    rd_word = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_readdata      <= '0;
      s_readdatavalid <= 1'b0;
    end else begin
      s_readdatavalid <= s_read;
      if (s_read) s_readdata <= rd_word;
    end
  end

endmodule
