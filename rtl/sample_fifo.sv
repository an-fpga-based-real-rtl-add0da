// sample_fifo: the on-chip sample buffer of the timestamping core.
//
// A first-in first-out buffer with a write port (filled by the control
// block) and an independent read port (drained by the bus interface
// adapter). It absorbs bursts of events while the SSRAM port is busy or
// held, so its depth sets the longest burst that is stored without loss.
//
// How it works: the samples are kept in a simple dual-port memory that is
// written and read synchronously, as FPGA block RAM requires. In front of
// the read port sits one output register that always holds the oldest
// sample (show-ahead): whenever it is empty, or being emptied, and the
// memory holds a sample, the next one is read into it. The memory and the
// output register together hold at most DEPTH samples.
//
// Interface: wr_en writes wr_data when not full; a write while full is
// ignored. rd_data is the oldest sample while empty is low, and rd_en
// removes it. Reads and writes may happen in the same cycle. level counts
// every sample held, including one still on its way to the output
// register. clear empties the buffer synchronously.
//
// Timing: a sample written into an empty FIFO on one clock edge is at
// rd_data (empty low) after the next edge; after that the FIFO delivers one
// sample per clock. full and level change on the edge that writes or removes.
//
// The document gives the FIFO's role, its independent ports and its place
// in on-chip memory; the depth (1024 samples), the single clock and the
// show-ahead output register are this design's choices.
module sample_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   ram_cnt;     // samples in the memory
  logic          out_valid;   // output register holds a sample
  logic          do_wr, pop, load;

  assign full    = (level == DEPTH[AW:0]);
  assign empty   = !out_valid;
  assign do_wr   = wr_en && !full;
  assign pop     = rd_en && out_valid;
  assign load    = (ram_cnt != '0) && (!out_valid || pop);
  assign level   = ram_cnt + {{AW{1'b0}}, out_valid};

  // memory: synchronous write and synchronous read
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (load)  rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      ram_cnt   <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      ram_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (load)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, load})
        2'b10:   ram_cnt <= ram_cnt + 1'b1;
        2'b01:   ram_cnt <= ram_cnt - 1'b1;
        default: ram_cnt <= ram_cnt;
      endcase
      if (load)     out_valid <= 1'b1;
      else if (pop) out_valid <= 1'b0;
    end
  end

endmodule
