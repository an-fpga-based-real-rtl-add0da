// change_detector: the "compare to previous" stage of the sampling pipeline.
//
// It compares the input bits of each sample with those of the sample of
// the cycle before and flags the sample as changed when any bit differs;
// the timestamp bits take no part in the comparison. Only changed samples
// are stored, which is what makes the sampler event-based rather than
// continuous. The comparison follows the document; the reset value of the
// remembered inputs (all zero) is this design's choice.
//
// Timing: one register stage. sample_o and changed are valid one clock
// after sample_i.
module change_detector #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned TS_W = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IN_W+TS_W-1:0] sample_i,
  output logic [IN_W+TS_W-1:0] sample_o,
  output logic                 changed
);

  logic [IN_W-1:0] prev_in;
  logic [IN_W-1:0] cur_in;

  assign cur_in = sample_i[IN_W+TS_W-1:TS_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_in  <= '0;
      sample_o <= '0;
      changed  <= 1'b0;
    end else begin
      prev_in  <= cur_in;
      sample_o <= sample_i;
      changed  <= (cur_in != prev_in);
    end
  end

endmodule
