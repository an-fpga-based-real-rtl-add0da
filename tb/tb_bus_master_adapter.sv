// tb_bus_master_adapter: a FIFO model feeds the adapter and a memory model
// with random waitrequest takes its writes. Every sample must be written
// once, in order, at consecutive word addresses, with address and data held
// while the memory waits. hold and mem_full must stop new writes. With no
// waiting the adapter must write one sample per clock.
module tb_bus_master_adapter;
  localparam int unsigned W = 32, AW = 32;
  localparam logic [31:0] BASE = 32'h0800_0000;

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0, hold = 1'b0;
  logic          fifo_empty, fifo_rd, mem_full = 1'b0, launch;
  logic [W-1:0]  fifo_data;
  logic [AW-1:0] addr;
  logic [AW-1:0] m_address;
  logic          m_write, m_waitrequest = 1'b0;
  logic [W-1:0]  m_writedata;
  logic [3:0]    m_byteenable;
  int            checks = 0, failures = 0;

  // FIFO model
  logic [W-1:0] fm [4096];
  int           head = 0, tail = 0;
  assign fifo_empty = (head == tail);
  assign fifo_data  = fm[head % 4096];

  // address counter model: one word before BASE, +4 per launch
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) addr <= BASE - 4;
    else if (launch) addr <= addr + 4;

  bus_master_adapter #(.W(W), .ADDR_W(AW)) dut (
    .clk, .rst_n, .clear, .hold, .fifo_empty, .fifo_data, .fifo_rd,
    .addr, .mem_full, .launch,
    .m_address, .m_write, .m_writedata, .m_byteenable, .m_waitrequest
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // memory model: check every accepted write against the stream order
  int n_written = 0;
  logic [AW-1:0] held_a;
  logic [W-1:0]  held_d;
  bit            was_waiting = 0;
  always @(posedge clk) begin
    if (rst_n && m_write) begin
      if (was_waiting) check(m_address == held_a && m_writedata == held_d, "stable while waiting");
      if (!m_waitrequest) begin
        check(m_address == BASE + 4 * n_written, "write address");
        check(m_writedata == fm[n_written % 4096], "write data");
        check(m_byteenable == 4'hf, "byte enables");
        n_written++;
      end
    end
    was_waiting = m_write && m_waitrequest;
    held_a = m_address;
    held_d = m_writedata;
    if (fifo_rd) begin
      check(!fifo_empty, "read from empty FIFO");
      head <= head + 1;
    end
  end

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      fm[tail % 4096] = $urandom;
      tail++;
    end
  endtask

  initial begin
    int t0, cycles, launched;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random traffic with random waiting and holds
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(2) == 0) push(1);
      m_waitrequest = ($urandom_range(2) == 0);
      if (n % 200 == 0) hold = ~hold;
      #1;
      if (hold) check(!launch, "no launch while held");
      @(negedge clk);
    end
    hold = 0;
    m_waitrequest = 0;
    repeat (1000) @(negedge clk);
    check(n_written == tail, "everything written");
    // throughput: one write per clock
    push(50);
    t0 = n_written;
    cycles = 0;
    while (n_written < t0 + 50 && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 51, "one write per clock");
    $display("50 writes took %0d cycles", cycles);
    // memory full stops launching
    mem_full = 1;
    push(5);
    launched = 0;
    repeat (20) begin
      #1;
      if (launch) launched++;
      @(negedge clk);
    end
    check(launched == 0, "no launch when memory full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
