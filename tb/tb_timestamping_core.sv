// tb_timestamping_core: end-to-end test of the timestamping core alone,
// with an 8-bit timestamp so that the counter wraps every 256 clocks and
// wrap events mix with pin events throughout.
//
// The testbench acts as the system under test (pins), the control software
// (management registers) and the SSRAM (a memory model with random wait
// states). From its own pin history and timestamp it works out which
// samples must be stored, and compares them with the writes, in order, at
// consecutive addresses from BASE. Commands are issued away from a
// timestamp wrap so that the start and end of each recording are exact.
// Phases: random events and STOP; a wrap; external channel 7; WRITE_HOLD
// and FIFO overflow; the SUT error stop; memory full (512 samples); each
// ends with a RESET. Every mechanism is counted and must happen.
module tb_timestamping_core;
  import sampler_pkg::*;

  localparam int unsigned FIFO_DEPTH = 16;
  localparam int unsigned CNT_W      = 10;
  localparam int unsigned TSW        = 8;
  localparam int unsigned SW         = 8 + TSW;
  localparam int unsigned MEM_SAMPLES = 1 << (CNT_W - 1);
  localparam logic [31:0] SSRAM_BASE  = 32'h0800_0000;
  
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [6:0]  sut_in = '0;
  logic        ext_ch7 = 1'b0;
  logic [2:0]  ctl_address = '0;
  logic        ctl_read = 1'b0, ctl_write = 1'b0;
  logic [31:0] ctl_writedata = '0, ctl_readdata;
  logic        ctl_readdatavalid;
  logic [31:0]   ssram_address;
  logic [SW-1:0] ssram_writedata;
  logic          ssram_write, ssram_waitrequest;
  logic [SW/8-1:0] ssram_byteenable;

  timestamping_core #(
    .IN_W(8), .TS_W(TSW), .FIFO_DEPTH(FIFO_DEPTH), .CNT_W(CNT_W),
    .ADDR_W(32), .BASE(SSRAM_BASE)
  ) dut (
    .clk, .rst_n, .sut_in, .ext_ch7,
    .s_address(ctl_address), .s_read(ctl_read), .s_write(ctl_write),
    .s_writedata(ctl_writedata), .s_readdata(ctl_readdata),
    .s_readdatavalid(ctl_readdatavalid),
    .m_address(ssram_address), .m_write(ssram_write), .m_writedata(ssram_writedata),
    .m_byteenable(ssram_byteenable), .m_waitrequest(ssram_waitrequest)
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // Edge counter and pin history: P[k % 65536] is the pin value before
  // edge k. Windows of more than 65536 edges are only checked while the
  // pins are still, where the wrapped history holds the same value.
  int n = -1;
  logic [7:0] P [65536];
  initial foreach (P[i]) P[i] = '0;
  always @(posedge clk) if (rst_n) begin
    n = n + 1;
    P[n % 65536] = {ext_ch7, sut_in};
  end

  // Timestamp model: ts before edge k is (k - ts_base) mod 2**TSW.
  int ts_base = 0;
  bit sel_ext = 0;

  function automatic logic [7:0] ch_at(input int k);
    logic [7:0] c;
    c = P[(k - 2) % 65536];
    if (!sel_ext) c[7] = 1'(((k - ts_base) >> TSW) & 1);
    return c;
  endfunction

  function automatic logic [SW-1:0] sample_at(input int k);
    return {ch_at(k), TSW'(k - ts_base)};
  endfunction

  // ------------------------------------------------------------------
  // SSRAM model: records writes in order; random wait states when enabled.
  logic [31:0] wr_addr [$];
  logic [SW-1:0] wr_data [$];
  bit          random_wait = 0;
  int          n_stall = 0;
  always @(negedge clk) ssram_waitrequest <= random_wait ? ($urandom_range(2) == 0) : 1'b0;
  always @(posedge clk) if (rst_n && ssram_write) begin
    if (ssram_waitrequest) n_stall++;
    else begin
      wr_addr.push_back(ssram_address);
      wr_data.push_back(ssram_writedata);
      if (ssram_byteenable != '1) begin failures++; checks++; end
    end
  end

  // ------------------------------------------------------------------
  // Management access.
  task automatic reg_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    ctl_address = a; ctl_writedata = d; ctl_write = 1;
    @(negedge clk);
    ctl_write = 0;
  endtask

  // returns the data and the edge at which the register was sampled
  task automatic reg_read(input logic [2:0] a, output logic [31:0] d, output int at);
    @(negedge clk);
    ctl_address = a; ctl_read = 1;
    @(negedge clk);
    ctl_read = 0;
    at = n;
    check(ctl_readdatavalid, "read data valid after one cycle");
    d = ctl_readdata;
  endtask

  logic [31:0] cfg = 32'(1) << CTRL_ERR_STOP;

  task automatic command(input int bitpos);
    reg_write(REG_CTRL, cfg | (32'(1) << bitpos));
  endtask

  task automatic set_cfg(input int bitpos, input bit v);
    cfg[bitpos] = v;
    reg_write(REG_CTRL, cfg);
  endtask

  task automatic read_status(output logic [31:0] s);
    int at;
    reg_read(REG_STATUS, s, at);
  endtask

  // reset the sampler, empty the memory model, measure the timestamp base
  int n_reset = 0;
  task automatic sampler_reset();
    logic [31:0] d;
    int at;
    command(CTRL_RESET);
    repeat (3) @(negedge clk);
    reg_read(REG_TSTAMP, d, at);
    ts_base = at - int'(d);
    check(d < 32, "timestamp restarts at reset");
    reg_read(REG_COUNT, d, at);
    check(d == 0, "sample count cleared by reset");
    reg_read(REG_ADDR, d, at);
    check(d == SSRAM_BASE - 2, "address counter back to one word before the base");
    reg_read(REG_STATUS, d, at);
    check(d == (32'(1) << ST_FIFO_EMPTY), "status idle and empty after reset");
    wr_addr.delete();
    wr_data.delete();
    n_reset++;
  endtask

  // ------------------------------------------------------------------
  // Pin activity
  bit pins_active = 0;
  int change_pct = 10;
  always @(negedge clk) if (pins_active) begin
    if ($urandom_range(99) < change_pct) begin
      int unsigned i;
      i = $urandom_range(5);
      sut_in[i] <= ~sut_in[i];
    end
    if (sel_ext && $urandom_range(99) < change_pct) ext_ch7 <= ~ext_ch7;
  end

  task automatic quiet(input int cycles);
    pins_active = 0;
    repeat (cycles) @(negedge clk);
  endtask

  // expected samples between two edges, at most limit of them
  logic [SW-1:0] expq [$];
  task automatic expect_window(input int a, input int b);
    expq.delete();
    for (int k = a; k <= b; k++)
      if (ch_at(k) != ch_at(k - 1)) expq.push_back(sample_at(k));
  endtask

  // compare memory writes with the first cnt expected samples
  task automatic compare_memory(input int cnt, input string what);
    bit ok;
    ok = (wr_data.size() == cnt) && (expq.size() >= cnt);
    if (!ok) $display("%s: %0d writes, %0d expected samples, %0d wanted",
                      what, wr_data.size(), expq.size(), cnt);
    check(ok, {what, ": number of stored samples"});
    for (int i = 0; i < cnt && i < wr_data.size() && i < expq.size(); i++) begin
      check(wr_addr[i] == SSRAM_BASE + 32'(2 * i), {what, ": write address"});
      if (wr_data[i] != expq[i]) begin
        check(0, {what, ": stored sample"});
        if (failures < 30) $display("  sample %0d: %h expected %h", i, wr_data[i], expq[i]);
      end else checks++;
    end
  endtask

  // wait until the status shows a halt, at most max_cycles
  task automatic wait_halt(input int max_cycles, output logic [31:0] s);
    int t;
    t = 0;
    do begin
      read_status(s);
      t += 2;
    end while (!s[ST_HALTED] && t < max_cycles);
  endtask

  task automatic drain();
    logic [31:0] s;
    int t;
    t = 0;
    do begin
      repeat (8) @(negedge clk);
      read_status(s);
      t++;
    end while (!s[ST_FIFO_EMPTY] && t < 1000);
    repeat (4) @(negedge clk);
  endtask

  // wait until the timestamp is well away from a wrap
  task automatic safe_point();
    while (((n - ts_base) % (1 << TSW)) < 40 || ((n - ts_base) % (1 << TSW)) > 200)
      @(negedge clk);
  endtask

  // mechanism counters
  int m_events = 0, m_suppressed = 0, m_wrap = 0, m_ext = 0, m_hold = 0;
  int m_fifo_ovf = 0, m_err = 0, m_full = 0, m_stop = 0;

  initial begin
    logic [31:0] s, d;
    int a, b, at;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    sampler_reset();

    // ---- 1. random events with wait states, then stop
    random_wait = 1;
    command(CTRL_START);
    a = n;
    quiet(10);
    a = n;
    pins_active = 1;
    repeat (3000) @(negedge clk);
    quiet(10);
    safe_point();
    b = n;
    command(CTRL_STOP);
    m_stop++;
    quiet(10);
    drain();
    expect_window(a, b);
    m_suppressed += (b - a + 1) - expq.size();
    m_events += expq.size();
    compare_memory(expq.size(), "random events");
    read_status(s);
    check(!s[ST_RUNNING] && !s[ST_HALTED], "idle after stop");
    reg_read(REG_COUNT, d, at);
    check(d == wr_data.size(), "COUNT equals samples written");
    reg_read(REG_ADDR, d, at);
    check(d == SSRAM_BASE + 2 * (wr_data.size() - 1), "ADDR is the last written address");
    check(n_stall > 0, "wait states seen");
    random_wait = 0;
    sampler_reset();

    // ---- 2. timestamp wrap
    safe_point();
    command(CTRL_START);
    quiet(10);
    a = n;
    // run until just past the wrap, with the pins still
    while ((n - ts_base) < (1 << TSW) + 20) @(negedge clk);
    b = n;
    command(CTRL_STOP);
    quiet(10);
    drain();
    expect_window(a, b);
    compare_memory(1, "timestamp wrap");
    if (wr_data.size() == 1 && wr_data[0][SW-1] && wr_data[0][TSW-1:0] == '0) m_wrap++;
    sampler_reset();

    // ---- 3. channel 7 from its pin
    set_cfg(CTRL_CH7_EXT, 1);
    sel_ext = 1;
    quiet(5);
    safe_point();
    command(CTRL_START);
    quiet(10);
    a = n;
    pins_active = 1;
    repeat (400) @(negedge clk);
    quiet(10);
    safe_point();
    b = n;
    command(CTRL_STOP);
    quiet(5);
    drain();
    expect_window(a, b);
    compare_memory(expq.size(), "external channel 7");
    foreach (expq[i]) if (i > 0 && expq[i][SW-1] != expq[i-1][SW-1]) m_ext++;
    set_cfg(CTRL_CH7_EXT, 0);
    sel_ext = 0;
    sampler_reset();

    // ---- 4. write hold and FIFO overflow
    set_cfg(CTRL_WRITE_HOLD, 1);
    safe_point();
    command(CTRL_START);
    quiet(10);
    a = n;
    change_pct = 30;
    pins_active = 1;
    wait_halt(2000, s);
    b = n;
    quiet(10);
    check(s[ST_HALTED] && s[ST_FIFO_OVF], "FIFO overflow halts the sampler");
    check(wr_data.size() == 0, "nothing written while held");
    if (s[ST_FIFO_OVF]) m_fifo_ovf++;
    reg_read(REG_LEVEL, d, at);
    check(d == FIFO_DEPTH, "FIFO full at the overflow");
    set_cfg(CTRL_WRITE_HOLD, 0);
    m_hold++;
    drain();
    expect_window(a, b);
    compare_memory(FIFO_DEPTH, "FIFO overflow");
    command(CTRL_START);  // ignored while halted
    read_status(s);
    check(s[ST_HALTED] && !s[ST_RUNNING], "start ignored while halted");
    change_pct = 10;
    sampler_reset();

    // ---- 5. SUT error channel
    safe_point();
    command(CTRL_START);
    quiet(10);
    a = n;
    pins_active = 1;
    repeat (300) @(negedge clk);
    pins_active = 0;
    @(negedge clk);
    sut_in[CH_ERROR] = 1'b1;
    pins_active = 1;
    repeat (200) @(negedge clk);
    read_status(s);
    check(s[ST_HALTED] && s[ST_SUT_ERROR], "SUT error halts the sampler");
    if (s[ST_SUT_ERROR]) m_err++;
    b = n;
    quiet(10);
    drain();
    expect_window(a, b);
    // keep the expected samples up to and including the first with the error bit
    begin
      int last;
      last = -1;
      foreach (expq[i]) if (last < 0 && expq[i][TSW + CH_ERROR]) last = i;
      check(last >= 0, "error sample expected");
      compare_memory(last + 1, "SUT error");
    end
    sut_in[CH_ERROR] = 1'b0;
    sampler_reset();

    // ---- 6. memory full: an event on every clock, written at one per clock
    random_wait = 0;
    safe_point();
    command(CTRL_START);
    quiet(10);
    a = n;
    change_pct = 100;
    pins_active = 1;
    wait_halt(20000, s);
    b = n;
    quiet(10);
    change_pct = 10;
    drain();
    read_status(s);
    check(s[ST_HALTED] && s[ST_MEM_FULL], "full memory halts the sampler");
    if (s[ST_MEM_FULL]) m_full++;
    reg_read(REG_COUNT, d, at);
    check(d == MEM_SAMPLES, "COUNT at full");
    expect_window(a, b);
    compare_memory(MEM_SAMPLES, "memory full");
    sampler_reset();

    $display("mechanisms: events %0d, unchanged cycles suppressed %0d, wait states %0d, wraps %0d,",
             m_events, m_suppressed, n_stall, m_wrap);
    $display("  ext ch7 changes %0d, write holds %0d, FIFO overflows %0d, SUT errors %0d,",
             m_ext, m_hold, m_fifo_ovf, m_err);
    $display("  memory full %0d, stops %0d, resets %0d", m_full, m_stop, n_reset);
    check(m_events > 0, "event storage happened");
    check(m_suppressed > 0, "unchanged samples suppressed");
    check(n_stall > 0, "SSRAM wait states happened");
    check(m_wrap > 0, "timestamp wrap stored");
    check(m_ext > 0, "external channel 7 used");
    check(m_hold > 0, "write hold used");
    check(m_fifo_ovf > 0, "FIFO overflow happened");
    check(m_err > 0, "SUT error stop happened");
    check(m_full > 0, "memory full happened");
    check(m_stop > 0, "stop happened");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
