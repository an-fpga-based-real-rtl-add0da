// bus_master_adapter: turns the FIFO's read side into a memory-mapped
// write master towards the SSRAM.
//
// The adapter holds one write in an output register. Whenever that register
// is free, or its write is being accepted in this cycle, and the FIFO holds
// a sample, it pops the sample, loads it and raises m_write; the same
// launch pulse increments the address and sample counters, whose new
// address is presented with the data. It does not launch while the memory
// is full or while hold is set: hold lets software keep samples in the FIFO
// so that the single-ported SSRAM is free for DMA transfers.
//
// Bus rules (Avalon-MM style, asserted below): a write is accepted on a
// clock edge where m_write is high and m_waitrequest is low; while
// m_waitrequest is high, m_address and m_writedata stay stable. With
// m_waitrequest low the adapter writes one sample per clock.
//
// The document gives the adapter's role and the address counter that feeds
// it; the handshake, the hold input and the single output register are this
// design's choices. clear drops a pending write.
//
// The assertion uses rst_n synchronously in its disable condition while the
// registers use it asynchronously; lint tools report this, and it stands
// because it concerns only the check, not the circuit.
module bus_master_adapter #(
  parameter int unsigned W      = 32,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              hold,
  // FIFO read side
  input  logic              fifo_empty,
  input  logic [W-1:0]      fifo_data,
  output logic              fifo_rd,
  // counters
  input  logic [ADDR_W-1:0] addr,
  input  logic              mem_full,
  output logic              launch,
  // memory-mapped write master
  output logic [ADDR_W-1:0] m_address,
  output logic              m_write,
  output logic [W-1:0]      m_writedata,
  output logic [W/8-1:0]    m_byteenable,
  input  logic              m_waitrequest
);

  logic slot_free;

  assign slot_free    = !m_write || !m_waitrequest;
  assign launch       = slot_free && !fifo_empty && !mem_full && !hold && !clear;
  assign fifo_rd      = launch;
  assign m_address    = addr;
  assign m_byteenable = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_write     <= 1'b0;
      m_writedata <= '0;
    end else if (clear) begin
      m_write     <= 1'b0;
    end else if (launch) begin
      m_write     <= 1'b1;
      m_writedata <= fifo_data;
    end else if (slot_free) begin
      m_write     <= 1'b0;
    end
  end

  // A write that is kept waiting must not change.
  a_hold_stable : assert property (@(posedge clk) disable iff (!rst_n)
      (m_write && m_waitrequest && !clear) |=>
        (m_write && $stable(m_address) && $stable(m_writedata)))
    else $error("write master changed a write while it was kept waiting");

endmodule
