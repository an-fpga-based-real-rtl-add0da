// offset_bridge: memory-mapped bridge that shifts addresses by a constant.
//
// In a flat system memory map a clock crossing bridge adds its own base
// address to the addresses of the slaves behind it. An offset bridge placed
// on another path to the same slave removes that offset again, so every
// master reaches the slave at the address it expects. The bridge forwards
// every signal unchanged except the address: m_address = s_address -
// ADDR_OFFSET (modulo 2**ADDR_W). It has no registers and adds no latency.
//
// The purpose of the bridge follows the document; the subtraction form,
// the signal set (Avalon-MM style with waitrequest and readdatavalid) and
// the default offset are this design's choices.
module offset_bridge #(
  parameter int unsigned       ADDR_W      = 32,
  parameter int unsigned       DATA_W      = 32,
  parameter logic [ADDR_W-1:0] ADDR_OFFSET = 32'h0800_0000
) (
  // slave side, towards the master
  input  logic [ADDR_W-1:0]   s_address,
  input  logic                s_read,
  input  logic                s_write,
  input  logic [DATA_W-1:0]   s_writedata,
  input  logic [DATA_W/8-1:0] s_byteenable,
  output logic [DATA_W-1:0]   s_readdata,
  output logic                s_readdatavalid,
  output logic                s_waitrequest,
  // master side, towards the slave
  output logic [ADDR_W-1:0]   m_address,
  output logic                m_read,
  output logic                m_write,
  output logic [DATA_W-1:0]   m_writedata,
  output logic [DATA_W/8-1:0] m_byteenable,
  input  logic [DATA_W-1:0]   m_readdata,
  input  logic                m_readdatavalid,
  input  logic                m_waitrequest
);

  assign m_address       = s_address - ADDR_OFFSET;
  assign m_read          = s_read;
  assign m_write         = s_write;
  assign m_writedata     = s_writedata;
  assign m_byteenable    = s_byteenable;
  assign s_readdata      = m_readdata;
  assign s_readdatavalid = m_readdatavalid;
  assign s_waitrequest   = m_waitrequest;

endmodule
