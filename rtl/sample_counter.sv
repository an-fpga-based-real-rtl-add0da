// sample_counter: number of samples written to the off-chip memory.
//
// A separate counter, incremented together with the address counter, that
// starts at zero. Its top bit (bit 19 at the default width) is the
// "memory full" flag: it becomes one after 2**(CNT_W-1) samples. Keeping
// this counter apart from the address counter means neither the count nor
// the full condition needs an adder on the address. All of this follows
// the document; the counter stops once full (it never wraps) as this
// design's choice.
//
// Timing: inc advances count on the next clock edge; full is count's top
// bit. clear (synchronous) and rst_n return it to zero.
module sample_counter #(
  parameter int unsigned CNT_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  output logic [CNT_W-1:0] count,
  output logic             full
);

  assign full = count[CNT_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (clear)         count <= '0;
    else if (inc && !full)  count <= count + 1'b1;
  end

endmodule
