// tb_event_sampler_full: one complete recording with the sampler at its
// default sizes: a 24-bit timestamp, a 1024-sample FIFO and an external
// memory that is full after 2**19 samples.
//
// The testbench starts the sampler and toggles one of the six data and
// interrupt pins on about one clock in 40, so that the memory fills after
// about 21 million clocks and the timestamp wraps on the way. The SSRAM
// model inserts random wait states. Expected samples are worked out on the
// fly from the testbench's own pin history and timestamp, and every write
// is compared with them as it arrives, address and data. The run ends when
// the sampler halts with the memory full; the test then checks the status,
// the sample count, that all 2**19 samples were right, and that at least
// one timestamp wrap was stored.
module tb_event_sampler_full;
  import sampler_pkg::*;

  localparam int unsigned TSW         = 24;
  localparam int unsigned MEM_SAMPLES = 1 << 19;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [6:0]  sut_in = '0;
  logic        ext_ch7 = 1'b0;
  logic [2:0]  ctl_address = '0;
  logic        ctl_read = 1'b0, ctl_write = 1'b0;
  logic [31:0] ctl_writedata = '0, ctl_readdata;
  logic        ctl_readdatavalid;
  logic [31:0] ssram_address, ssram_writedata;
  logic        ssram_write, ssram_waitrequest = 1'b0;
  logic [3:0]  ssram_byteenable;
  logic [31:0] dsc_s_readdata, dsc_m_address, dsc_m_writedata;
  logic        dsc_s_readdatavalid, dsc_s_waitrequest, dsc_m_read, dsc_m_write;
  logic [3:0]  dsc_m_byteenable;

  event_sampler_top dut (
    .clk, .rst_n, .sut_in, .ext_ch7,
    .ctl_address, .ctl_read, .ctl_write, .ctl_writedata, .ctl_readdata, .ctl_readdatavalid,
    .ssram_address, .ssram_write, .ssram_writedata, .ssram_byteenable, .ssram_waitrequest,
    .dsc_s_address('0), .dsc_s_read(1'b0), .dsc_s_write(1'b0), .dsc_s_writedata('0),
    .dsc_s_byteenable('0), .dsc_s_readdata, .dsc_s_readdatavalid, .dsc_s_waitrequest,
    .dsc_m_address, .dsc_m_read, .dsc_m_write, .dsc_m_writedata, .dsc_m_byteenable,
    .dsc_m_readdata('0), .dsc_m_readdatavalid(1'b0), .dsc_m_waitrequest(1'b0)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (edge %0d)", what, n);
    end
  endtask

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge counter, pin history and the expected samples, built on the fly
  int          n = -1;
  int          ts_base = 0;
  bit          recording = 0;
  logic [7:0]  P [4];
  logic [31:0] expq [$];
  int          n_wrap_expected = 0;

  function automatic logic [7:0] ch_at(input int k);
    logic [7:0] c;
    c = P[(k - 2) % 4];
    c[7] = 1'(((k - ts_base) >> TSW) & 1);
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n = n + 1;
    P[n % 4] = {ext_ch7, sut_in};
    if (recording && ch_at(n) != ch_at(n - 1)) begin
      expq.push_back({ch_at(n), TSW'(n - ts_base)});
      if (ch_at(n)[7] != ch_at(n - 1)[7]) n_wrap_expected++;
    end
  end

  // SSRAM model: random wait states, every accepted write checked at once
  int n_written = 0, n_bad = 0, n_stall = 0, n_wrap_stored = 0;
  logic [31:0] last_data = '0;
  always @(negedge clk) ssram_waitrequest <= ($urandom_range(3) == 0);
  always @(posedge clk) if (rst_n && ssram_write) begin
    if (ssram_waitrequest) n_stall++;
    else begin
      if (expq.size() == 0 || ssram_address != 32'(4 * n_written) ||
          ssram_writedata != expq[0]) begin
        n_bad++;
        if (n_bad < 10)
          $display("FAIL write %0d: %h at %h, expected %h", n_written, ssram_writedata,
                   ssram_address, expq.size() ? expq[0] : 32'hx);
      end
      if (expq.size() > 0) void'(expq.pop_front());
      if (n_written > 0 && ssram_writedata[31] != last_data[31] && ssram_writedata[23:0] == 0)
        n_wrap_stored++;
      last_data = ssram_writedata;
      n_written++;
    end
  end

  // pins: one of channels 0..5 toggles on about one clock in 40
  bit pins_active = 0;
  always @(negedge clk) if (pins_active && $urandom_range(39) == 0) begin
    int unsigned i;
    i = $urandom_range(5);
    sut_in[i] <= ~sut_in[i];
  end

  task automatic reg_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    ctl_address = a; ctl_writedata = d; ctl_write = 1;
    @(negedge clk);
    ctl_write = 0;
  endtask

  task automatic reg_read(input logic [2:0] a, output logic [31:0] d, output int at);
    @(negedge clk);
    ctl_address = a; ctl_read = 1;
    @(negedge clk);
    ctl_read = 0;
    at = n;
    d = ctl_readdata;
  endtask

  initial begin
    logic [31:0] d, s;
    int at, polls, max_level;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    reg_read(REG_TSTAMP, d, at);
    ts_base = at - int'(d);
    reg_write(REG_CTRL, (32'(1) << CTRL_ERR_STOP) | (32'(1) << CTRL_START));
    repeat (10) @(negedge clk);
    recording = 1;
    pins_active = 1;
    polls = 0;
    max_level = 0;
    do begin
      repeat (1000) @(negedge clk);
      reg_read(REG_LEVEL, d, at);
      if (int'(d) > max_level) max_level = int'(d);
      reg_read(REG_STATUS, s, at);
      polls++;
    end while (!s[ST_HALTED] && polls < 30000);
    pins_active = 0;
    repeat (20) @(negedge clk);
    recording = 0;
    reg_read(REG_STATUS, s, at);
    check(s[ST_HALTED] && s[ST_MEM_FULL] && !s[ST_FIFO_OVF] && !s[ST_SUT_ERROR],
          "halted because the memory is full");
    reg_read(REG_COUNT, d, at);
    check(d == MEM_SAMPLES, "2**19 samples counted");
    reg_read(REG_ADDR, d, at);
    check(d == 32'h0800_0000 + 4 * (MEM_SAMPLES - 1), "last address");
    check(n_written == MEM_SAMPLES, "2**19 samples written");
    check(n_bad == 0, "every stored sample as expected");
    check(n_wrap_stored > 0 && n_wrap_expected > 0, "timestamp wrap stored");
    check(n_stall > 0, "wait states seen");
    $display("written %0d samples in %0d clocks, %0d wraps stored, %0d wait states, max FIFO level %0d",
             n_written, n, n_wrap_stored, n_stall, max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
