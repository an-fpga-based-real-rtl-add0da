// timestamping_core: samples the input channels, timestamps every change
// and stores the samples in external memory.
//
// Pipeline (one stage per step):
//   1. input_channels   synchronizes the pins and combines the eight
//                       channels with the 24-bit timestamp into a sample;
//   2. change_detector  compares the channels with the previous cycle's;
//   3. sampler_control  enqueues a changed sample when sampling is enabled;
//   4. sample_fifo      buffers samples;
//   5. bus_master_adapter writes them to the SSRAM, at the address given by
//                       address_counter, while sample_counter counts them
//                       and flags the memory full.
// timestamp_counter runs at the sampling clock and loops its overflow back
// into channel 7, so wraps are stored as events. mgmt_regs is the slave
// through which software controls the core.
//
// The structure follows the document. The single clock for sampling and
// writing (the document's two-domain configuration, with control arriving
// from the slow domain through a clock crossing bridge outside this core)
// and the FIFO depth are this design's choices.
//
// Timing: a pin change is enqueued four clock edges after it is seen at the
// pin (two synchronizer flops, the sample register and the compare
// register); it reaches the FIFO output one edge later, and its write is
// launched on the edge after that. Up to one sample per clock is accepted
// and written.
module timestamping_core
  import sampler_pkg::*;
#(
  parameter int unsigned       IN_W       = 8,
  parameter int unsigned       TS_W       = 24,
  parameter int unsigned       FIFO_DEPTH = 1024,
  parameter int unsigned       CNT_W      = 20,
  parameter int unsigned       ADDR_W     = 32,
  parameter logic [ADDR_W-1:0] BASE       = 32'h0800_0000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // sample inputs
  input  logic [IN_W-2:0]             sut_in,
  input  logic                        ext_ch7,
  // control slave
  input  logic [2:0]                  s_address,
  input  logic                        s_read,
  input  logic                        s_write,
  input  logic [31:0]                 s_writedata,
  output logic [31:0]                 s_readdata,
  output logic                        s_readdatavalid,
  // data master towards the SSRAM
  output logic [ADDR_W-1:0]           m_address,
  output logic                        m_write,
  output logic [IN_W+TS_W-1:0]        m_writedata,
  output logic [(IN_W+TS_W)/8-1:0]    m_byteenable,
  input  logic                        m_waitrequest
);

  localparam int unsigned SW    = IN_W + TS_W;
  localparam int unsigned LVL_W = $clog2(FIFO_DEPTH) + 1;

  logic [TS_W-1:0]   ts;
  logic              ovf_toggle;
  logic [SW-1:0]     sample_a, sample_b, push_data, fifo_data;
  logic              changed, push, fifo_full, fifo_empty, fifo_rd;
  logic [LVL_W-1:0]  fifo_level;
  logic              start, stop, soft_reset, err_stop_en, ch7_ext, write_hold;
  logic              clear, launch, mem_full;
  logic [ADDR_W-1:0] addr;
  logic [CNT_W-1:0]  count;
  ctl_state_e        state;
  stop_cause_t       cause;

  timestamp_counter #(.TS_W(TS_W)) u_ts (
    .clk, .rst_n, .clear, .ts, .ovf_toggle
  );

  input_channels #(.IN_W(IN_W), .TS_W(TS_W)) u_in (
    .clk, .rst_n, .sut_in, .ext_ch7, .ch7_ext, .ts, .ovf_toggle,
    .sample(sample_a)
  );

  change_detector #(.IN_W(IN_W), .TS_W(TS_W)) u_cmp (
    .clk, .rst_n, .sample_i(sample_a), .sample_o(sample_b), .changed
  );

  sampler_control #(.IN_W(IN_W), .TS_W(TS_W)) u_ctl (
    .clk, .rst_n, .start, .stop, .soft_reset, .err_stop_en,
    .sample_i(sample_b), .changed, .fifo_full, .push, .push_data,
    .mem_full, .clear_o(clear), .state, .cause
  );

  sample_fifo #(.W(SW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear, .wr_en(push), .wr_data(push_data), .full(fifo_full),
    .rd_en(fifo_rd), .rd_data(fifo_data), .empty(fifo_empty), .level(fifo_level)
  );

  bus_master_adapter #(.W(SW), .ADDR_W(ADDR_W)) u_bus (
    .clk, .rst_n, .clear, .hold(write_hold),
    .fifo_empty, .fifo_data, .fifo_rd,
    .addr, .mem_full, .launch,
    .m_address, .m_write, .m_writedata, .m_byteenable, .m_waitrequest
  );

  address_counter #(.ADDR_W(ADDR_W), .BASE(BASE), .STEP(SW / 8)) u_addr (
    .clk, .rst_n, .clear, .inc(launch), .addr
  );

  sample_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear, .inc(launch), .count, .full(mem_full)
  );

  mgmt_regs #(.CNT_W(CNT_W), .ADDR_W(ADDR_W), .TS_W(TS_W), .LVL_W(LVL_W)) u_mgmt (
    .clk, .rst_n, .s_address, .s_read, .s_write, .s_writedata,
    .s_readdata, .s_readdatavalid,
    .start, .stop, .soft_reset, .err_stop_en, .ch7_ext, .write_hold,
    .state, .cause, .fifo_empty(fifo_level == '0), .fifo_level, .count, .addr, .ts
  );

endmodule
