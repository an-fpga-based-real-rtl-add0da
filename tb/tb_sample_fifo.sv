// tb_sample_fifo: random pushes and pops on an 8-deep FIFO, compared with
// a queue in the testbench: data order, full, level, writes refused while
// full, simultaneous push and pop, and clear. The show-ahead output may
// trail a write into an empty FIFO by one clock, so empty may be high while
// the model holds one sample, never more; the write-to-read latency and
// the one-sample-per-clock drain rate are checked separately.
module tb_sample_fifo;
  localparam int unsigned W = 32, DEPTH = 8;

  logic                       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic                       wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0]               wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0]     level;
  int                         checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [W-1:0]               q[$];

  sample_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .clear, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .level
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (level %0d, model %0d)", what, $time, level, q.size());
    end
  endtask

  initial begin
    int bias;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10000; n++) begin
      bias  = (n / 500) % 2 ? 3 : 1;   // alternate filling and draining phases
      wr_en = ($urandom_range(3) < bias + 0) || ($urandom_range(3) == 0);
      rd_en = ($urandom_range(3) >= bias);
      wr_data = $urandom;
      clear = (n % 2500 == 2499);
      #1;
      check(!empty ? q.size() > 0 : q.size() <= 1, "empty");
      check(full == (q.size() == DEPTH), "full");
      check(int'(level) == q.size(), "level");
      if (!empty) check(rd_data == q[0], "read data");
      if (full) n_full++;
      @(posedge clk);
      if (clear) q.delete();
      else begin
        if (rd_en && !empty && wr_en) n_both++;
        if (rd_en && !empty) void'(q.pop_front());
        if (wr_en && !full) q.push_back(wr_data);
      end
      @(negedge clk);
    end
    check(n_full > 10 && n_both > 10, "full and simultaneous access exercised");
    // latency and drain rate
    wr_en = 0; rd_en = 1; clear = 0;
    repeat (DEPTH + 2) @(negedge clk);
    check(empty && level == 0, "drained");
    rd_en = 0; wr_en = 1; wr_data = 32'h1234_5678;
    @(negedge clk);
    wr_en = 0;
    check(empty && level == 1, "one edge after the write: not yet visible");
    @(negedge clk);
    check(!empty && rd_data == 32'h1234_5678, "two edges after the write: visible");
    for (int i = 0; i < DEPTH - 1; i++) begin
      wr_en = 1; wr_data = 32'(i);
      @(negedge clk);
    end
    wr_en = 0;
    check(full, "full");
    rd_en = 1;
    for (int i = 0; i < DEPTH; i++) begin
      #1;
      check(!empty, "one sample per clock while draining");
      @(negedge clk);
    end
    check(empty && level == 0, "empty after DEPTH reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
