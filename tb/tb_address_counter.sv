// tb_address_counter: the counter must start one word below BASE, advance
// one word per increment, hold otherwise, and return to its start on clear.
module tb_address_counter;
  localparam logic [31:0] BASE = 32'h0800_0000;

  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, inc = 1'b0;
  logic [31:0] addr;
  int          checks = 0, failures = 0;

  address_counter #(.ADDR_W(32), .BASE(BASE), .STEP(4)) dut (.clk, .rst_n, .clear, .inc, .addr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: addr=%h", what, addr); end
  endtask

  initial begin
    logic [31:0] exp_a;
    repeat (2) @(negedge clk);
    check(addr == 32'h07ff_fffc, "reset value");
    rst_n = 1'b1;
    exp_a = 32'h07ff_fffc;
    for (int n = 0; n < 2000; n++) begin
      inc = 1'($urandom);
      clear = ($urandom_range(300) == 0);
      @(negedge clk);
      if (clear) exp_a = 32'h07ff_fffc;
      else if (inc) exp_a += 4;
      check(addr == exp_a, "address");
    end
    clear = 0;
    inc = 1;
    @(negedge clk);
    inc = 0;
    @(negedge clk);
    exp_a = exp_a + 4;
    check(addr == exp_a, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
