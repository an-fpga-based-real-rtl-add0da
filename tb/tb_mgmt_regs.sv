// tb_mgmt_regs: writes and reads every register of the management slave.
// Command bits must give one-cycle pulses, configuration bits must be
// stored and read back, status fields must appear at their bit positions,
// and reads must return data exactly one cycle later.
module tb_mgmt_regs;
  import sampler_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  s_address = '0;
  logic        s_read = 0, s_write = 0;
  logic [31:0] s_writedata = '0, s_readdata;
  logic        s_readdatavalid;
  logic        start, stop, soft_reset, err_stop_en, ch7_ext, write_hold;
  ctl_state_e  state = CTL_IDLE;
  stop_cause_t cause = '0;
  logic        fifo_empty = 1'b1;
  logic [10:0] fifo_level = '0;
  logic [19:0] count = '0;
  logic [31:0] addr = '0;
  logic [23:0] ts = '0;
  int          checks = 0, failures = 0;

  mgmt_regs dut (.*);

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
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    s_address = a; s_writedata = d; s_write = 1;
    @(negedge clk);
    s_write = 0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    s_address = a; s_read = 1;
    @(negedge clk);
    s_read = 0;
    check(s_readdatavalid, "readdatavalid one cycle after read");
    d = s_readdata;
    @(negedge clk);
    check(!s_readdatavalid, "readdatavalid lasts one cycle");
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(err_stop_en && !ch7_ext && !write_hold, "reset configuration");
    // each command is a one-cycle pulse
    for (int b = 0; b < 3; b++) begin
      wr(REG_CTRL, 32'(1 << b) | 32'(1 << CTRL_ERR_STOP));
      check({soft_reset, stop, start} == 3'(1 << b), "command pulse");
      @(negedge clk);
      check({soft_reset, stop, start} == 3'b000, "pulse ends");
    end
    // configuration bits
    for (int v = 0; v < 8; v++) begin
      wr(REG_CTRL, 32'(v) << CTRL_ERR_STOP);
      check({write_hold, ch7_ext, err_stop_en} == 3'(v), "configuration outputs");
      rd(REG_CTRL, d);
      check(d == (32'(v) << CTRL_ERR_STOP), "CTRL read back");
    end
    // status
    state = CTL_RUN; cause = '0; fifo_empty = 0;
    rd(REG_STATUS, d);
    check(d == 32'h1, "status running");
    state = CTL_HALT; cause = '{mem_full: 1'b0, fifo_ovf: 1'b1, sut_error: 1'b1}; fifo_empty = 1;
    rd(REG_STATUS, d);
    check(d == 32'h2e, "status halted, error, overflow, empty");
    cause = '0; count = 20'h80000; state = CTL_IDLE; fifo_empty = 0;
    rd(REG_STATUS, d);
    check(d == 32'h10, "status memory full");
    // counters
    count = 20'h12345; addr = 32'h0804_8d14; ts = 24'habcdef; fifo_level = 11'd1024;
    rd(REG_COUNT, d);  check(d == 32'h12345, "COUNT");
    rd(REG_ADDR, d);   check(d == 32'h0804_8d14, "ADDR");
    rd(REG_TSTAMP, d); check(d == 32'habcdef, "TSTAMP");
    rd(REG_LEVEL, d);  check(d == 32'd1024, "LEVEL");
    rd(3'd7, d);       check(d == 0, "unused address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
