// event_sampler_top: the sampling (fast) clock domain of the event sampler.
//
// The sampler records, with a timestamp, every change on eight input
// channels of a system under test, and stores the records in external SSRAM
// from where software moves them out. This top holds the part of the
// system built from logic of its own:
//   - timestamping_core: samples, timestamps, buffers and writes the
//     changes, and is controlled through its management slave;
//   - an SSRAM offset bridge between the core's write master and the SSRAM
//     interface, which maps the core's system address of the SSRAM
//     (SSRAM_BASE upward) to SSRAM-local addresses (0 upward);
//   - the descriptor offset bridge that sits between the Ethernet DMA
//     engines and their descriptor memory.
// The CPU, the clock crossing bridge, the DMA engines, the memories and
// their controllers, the Ethernet MAC and the PLL are library components
// and external chips; their connections are brought out as ports:
//   ctl_*   management slave, reached by the CPU through the clock
//           crossing bridge;
//   ssram_* write master towards the SSRAM interface (pipeline bridge,
//           tri-state bridge, SSRAM);
//   dsc_s_* / dsc_m_* the two sides of the descriptor offset bridge.
// Everything runs on clk, the sampling clock. The composition follows the
// document; the port protocols, SSRAM_BASE and DESC_OFFSET are this
// design's choices.
module event_sampler_top
  import sampler_pkg::*;
#(
  parameter int unsigned       FIFO_DEPTH  = 1024,
  parameter int unsigned       CNT_W       = 20,
  parameter logic [31:0]       SSRAM_BASE  = 32'h0800_0000,
  parameter logic [31:0]       DESC_OFFSET = 32'h0100_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // sample inputs: channels 0..6 from the SUT, optional external channel 7
  input  logic [6:0]  sut_in,
  input  logic        ext_ch7,
  // management slave
  input  logic [2:0]  ctl_address,
  input  logic        ctl_read,
  input  logic        ctl_write,
  input  logic [31:0] ctl_writedata,
  output logic [31:0] ctl_readdata,
  output logic        ctl_readdatavalid,
  // SSRAM write master (SSRAM-local byte addresses)
  output logic [31:0] ssram_address,
  output logic        ssram_write,
  output logic [31:0] ssram_writedata,
  output logic [3:0]  ssram_byteenable,
  input  logic        ssram_waitrequest,
  // descriptor offset bridge, DMA side
  input  logic [31:0] dsc_s_address,
  input  logic        dsc_s_read,
  input  logic        dsc_s_write,
  input  logic [31:0] dsc_s_writedata,
  input  logic [3:0]  dsc_s_byteenable,
  output logic [31:0] dsc_s_readdata,
  output logic        dsc_s_readdatavalid,
  output logic        dsc_s_waitrequest,
  // descriptor offset bridge, memory side
  output logic [31:0] dsc_m_address,
  output logic        dsc_m_read,
  output logic        dsc_m_write,
  output logic [31:0] dsc_m_writedata,
  output logic [3:0]  dsc_m_byteenable,
  input  logic [31:0] dsc_m_readdata,
  input  logic        dsc_m_readdatavalid,
  input  logic        dsc_m_waitrequest
);

  logic [31:0] core_address, core_writedata;
  logic        core_write, core_waitrequest;
  logic [3:0]  core_byteenable;
  logic        ssram_read_unused, ssram_rdv_unused;
  logic [31:0] ssram_rd_unused;

  timestamping_core #(
    .IN_W(CHANNELS), .TS_W(TSTAMP_W), .FIFO_DEPTH(FIFO_DEPTH), .CNT_W(CNT_W),
    .ADDR_W(32), .BASE(SSRAM_BASE)
  ) u_core (
    .clk, .rst_n, .sut_in, .ext_ch7,
    .s_address(ctl_address), .s_read(ctl_read), .s_write(ctl_write),
    .s_writedata(ctl_writedata), .s_readdata(ctl_readdata),
    .s_readdatavalid(ctl_readdatavalid),
    .m_address(core_address), .m_write(core_write),
    .m_writedata(core_writedata), .m_byteenable(core_byteenable),
    .m_waitrequest(core_waitrequest)
  );

  offset_bridge #(.ADDR_W(32), .DATA_W(32), .ADDR_OFFSET(SSRAM_BASE)) u_ssram_bridge (
    .s_address(core_address), .s_read(1'b0), .s_write(core_write),
    .s_writedata(core_writedata), .s_byteenable(core_byteenable),
    .s_readdata(ssram_rd_unused), .s_readdatavalid(ssram_rdv_unused),
    .s_waitrequest(core_waitrequest),
    .m_address(ssram_address), .m_read(ssram_read_unused), .m_write(ssram_write),
    .m_writedata(ssram_writedata), .m_byteenable(ssram_byteenable),
    .m_readdata('0), .m_readdatavalid(1'b0), .m_waitrequest(ssram_waitrequest)
  );

  offset_bridge #(.ADDR_W(32), .DATA_W(32), .ADDR_OFFSET(DESC_OFFSET)) u_desc_bridge (
    .s_address(dsc_s_address), .s_read(dsc_s_read), .s_write(dsc_s_write),
    .s_writedata(dsc_s_writedata), .s_byteenable(dsc_s_byteenable),
    .s_readdata(dsc_s_readdata), .s_readdatavalid(dsc_s_readdatavalid),
    .s_waitrequest(dsc_s_waitrequest),
    .m_address(dsc_m_address), .m_read(dsc_m_read), .m_write(dsc_m_write),
    .m_writedata(dsc_m_writedata), .m_byteenable(dsc_m_byteenable),
    .m_readdata(dsc_m_readdata), .m_readdatavalid(dsc_m_readdatavalid),
    .m_waitrequest(dsc_m_waitrequest)
  );

endmodule
