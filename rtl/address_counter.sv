// address_counter: SSRAM destination address of the timestamping core.
//
// The counter holds the byte address of the most recently launched write.
// It starts one word before the base address of the external memory and
// is incremented by one word when a write is launched, so the first sample
// goes to BASE, the next to BASE+4, and so on. Starting one word early, and
// incrementing on each write, follow the document; the byte addressing and
// word step are this design's choices.
//
// Timing: inc advances addr on the next clock edge; clear (synchronous) and
// rst_n return it to BASE - STEP.
module address_counter #(
  parameter int unsigned      ADDR_W = 32,
  parameter logic [ADDR_W-1:0] BASE  = 32'h0800_0000,
  parameter int unsigned      STEP   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              inc,
  output logic [ADDR_W-1:0] addr
);

  localparam logic [ADDR_W-1:0] START = BASE - ADDR_W'(STEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= START;
    else if (clear) addr <= START;
    else if (inc)   addr <= addr + ADDR_W'(STEP);
  end

endmodule
