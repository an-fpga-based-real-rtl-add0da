// tb_sampler_control: drives the control block with commands, changed and
// unchanged samples, a FIFO-full flag and a memory-full flag, and compares
// push, state and stop causes with a reference model written in the
// testbench. Every way into and out of each state is exercised.
module tb_sampler_control;
  import sampler_pkg::*;
  localparam int unsigned IN_W = 8, TS_W = 24;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 start = 0, stop = 0, soft_reset = 0, err_stop_en = 1;
  logic [IN_W+TS_W-1:0] sample_i = '0, push_data;
  logic                 changed = 0, fifo_full = 0, mem_full = 0, push, clear_o;
  ctl_state_e           state;
  stop_cause_t          cause;
  int                   checks = 0, failures = 0;
  int                   n_halt_err = 0, n_halt_ovf = 0, n_halt_full = 0, n_stop = 0;

  sampler_control #(.IN_W(IN_W), .TS_W(TS_W)) dut (
    .clk, .rst_n, .start, .stop, .soft_reset, .err_stop_en,
    .sample_i, .changed, .fifo_full, .push, .push_data, .mem_full,
    .clear_o, .state, .cause
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
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference model
  int unsigned m_state;  // 0 idle, 1 run, 2 halt
  bit m_err, m_ovf, m_full;

  initial begin
    bit exp_push, err;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_state = 0; m_err = 0; m_ovf = 0; m_full = 0;
    for (int n = 0; n < 20000; n++) begin
      // new stimulus (commands are rare, errors rarer)
      start       = ($urandom_range(15) == 0);
      stop        = ($urandom_range(40) == 0);
      soft_reset  = ($urandom_range(60) == 0);
      err_stop_en = ($urandom_range(3) != 0);
      changed     = ($urandom_range(2) == 0);
      fifo_full   = ($urandom_range(30) == 0);
      mem_full    = ($urandom_range(80) == 0);
      sample_i    = {8'($urandom), 24'(n)};
      sample_i[TS_W + CH_ERROR] = ($urandom_range(20) == 0);
      #1;
      exp_push = (m_state == 1) && changed && !fifo_full;
      check(push == exp_push, "push");
      check(clear_o == soft_reset, "clear");
      if (push) check(push_data == sample_i, "push data");
      @(posedge clk);
      // model update
      err = exp_push && err_stop_en && sample_i[TS_W + CH_ERROR];
      if (soft_reset) begin
        m_state = 0; m_err = 0; m_ovf = 0; m_full = 0;
      end else begin
        if (m_state == 1) begin
          if (changed && fifo_full) begin m_ovf = 1; n_halt_ovf++; end
          if (err) begin m_err = 1; n_halt_err++; end
          if (mem_full) begin m_full = 1; n_halt_full++; end
          if ((changed && fifo_full) || err || mem_full) m_state = 2;
          else if (stop) begin m_state = 0; n_stop++; end
        end else if (m_state == 0) begin
          if (start && !mem_full) m_state = 1;
        end
      end
      @(negedge clk);
      check(int'(state) == m_state, "state");
      check(cause.sut_error == m_err && cause.fifo_ovf == m_ovf && cause.mem_full == m_full, "cause");
    end
    check(n_halt_err > 0 && n_halt_ovf > 0 && n_halt_full > 0 && n_stop > 0, "all exits seen");
    $display("halts: error %0d, overflow %0d, full %0d; stops %0d", n_halt_err, n_halt_ovf, n_halt_full, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
