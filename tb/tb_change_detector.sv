// tb_change_detector: feeds samples whose channel bits change rarely and
// whose timestamp bits change every cycle, and checks that a sample is
// flagged exactly when its channel bits differ from the previous cycle's.
module tb_change_detector;
  localparam int unsigned IN_W = 8, TS_W = 24;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [IN_W+TS_W-1:0] sample_i = '0, sample_o;
  logic                 changed;
  int                   checks = 0, failures = 0, flagged = 0;

  change_detector #(.IN_W(IN_W), .TS_W(TS_W)) dut (.clk, .rst_n, .sample_i, .sample_o, .changed);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IN_W-1:0] prev, cur;
    logic [IN_W+TS_W-1:0] last;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev = '0;
    for (int n = 0; n < 2000; n++) begin
      cur = prev;
      if ($urandom_range(3) == 0) cur[$urandom_range(IN_W-1)] ^= 1'b1;
      sample_i = {cur, TS_W'(n)};
      last = sample_i;
      @(negedge clk);
      checks += 2;
      if (changed !== (cur != prev)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: changed=%0d expected %0d", n, changed, cur != prev);
      end
      if (sample_o !== last) failures++;
      if (changed) flagged++;
      prev = cur;
    end
    checks++;
    if (flagged < 200 || flagged > 1000) begin
      failures++;
      $display("FAIL implausible number of changes %0d", flagged);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
