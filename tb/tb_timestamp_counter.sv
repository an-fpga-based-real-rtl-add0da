// tb_timestamp_counter: checks the free-running timestamp counter with a
// 6-bit width so that it wraps often. A reference count kept by the
// testbench is compared with ts every cycle; the overflow loopback must
// flip exactly when ts wraps to zero, and clear must restart both.
module tb_timestamp_counter;
  localparam int unsigned TS_W = 6;

  logic            clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [TS_W-1:0] ts;
  logic            ovf_toggle;
  int              checks = 0, failures = 0;

  timestamp_counter #(.TS_W(TS_W)) dut (.clk, .rst_n, .clear, .ts, .ovf_toggle);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ts=%0d toggle=%0d", what, ts, ovf_toggle);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref_n;
    int wraps;
    repeat (2) @(negedge clk);
    check(ts == 0 && ovf_toggle == 0, "reset value");
    rst_n = 1'b1;
    ref_n = 0;
    wraps = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ref_n++;
      check(ts == TS_W'(ref_n), "count");
      check(ovf_toggle == ((ref_n >> TS_W) & 1), "overflow toggle");
      if (ts == 0) wraps++;
    end
    check(wraps == 300 / (1 << TS_W), "number of wraps");
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(ts == 0 && ovf_toggle == 0, "clear");
    @(negedge clk);
    check(ts == 1, "count after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
