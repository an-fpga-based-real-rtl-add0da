// tb_sample_counter: with a 6-bit counter, full must rise after exactly 32
// increments (the top bit), the count must then stop, and clear must
// restart it. A second instance at the default width checks that full is
// bit 19, i.e. rises after 2**19 increments.
module tb_sample_counter;
  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, inc = 1'b0, inc_big = 1'b0;
  logic [5:0]  count;
  logic [19:0] count_big;
  logic        full, full_big;
  int          checks = 0, failures = 0;

  sample_counter #(.CNT_W(6)) dut (.clk, .rst_n, .clear, .inc, .count, .full);
  sample_counter dut_big (.clk, .rst_n, .clear(1'b0), .inc(inc_big), .count(count_big), .full(full_big));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: count=%0d full=%0d", what, count, full); end
  endtask

  initial begin
    int n_inc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(count == 0 && !full, "reset");
    n_inc = 0;
    for (int n = 0; n < 200; n++) begin
      inc = 1'($urandom);
      @(negedge clk);
      if (inc && n_inc < 32) n_inc++;
      check(int'(count) == n_inc, "count");
      check(full == (n_inc >= 32), "full flag");
    end
    check(full && count == 6'd32, "stops at full");
    inc = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(count == 0 && !full, "clear");
    // default width: full after 2**19 samples
    inc_big = 1;
    repeat ((1 << 19) - 1) @(negedge clk);
    check(!full_big && count_big == 20'h7ffff, "not full one before 2**19");
    @(negedge clk);
    check(full_big && count_big == 20'h80000, "full at 2**19");
    @(negedge clk);
    check(count_big == 20'h80000, "default width holds at full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
