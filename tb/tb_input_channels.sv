// tb_input_channels: drives random pins, a testbench timestamp and an
// overflow bit, and checks that each sample is {channels, timestamp} with
// the pins delayed by the two synchronizer stages and channel 7 taken from
// the overflow loopback or from its pin as selected.
module tb_input_channels;
  localparam int unsigned IN_W = 8, TS_W = 24;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [IN_W-2:0]      sut_in = '0;
  logic                 ext_ch7 = 1'b0, ch7_ext = 1'b0, ovf_toggle = 1'b0;
  logic [TS_W-1:0]      ts = '0;
  logic [IN_W+TS_W-1:0] sample;
  int                   checks = 0, failures = 0;

  // values present before each rising edge, indexed by edge number
  logic [IN_W-1:0] pins_h [int];
  logic [TS_W-1:0] ts_h   [int];
  logic            tog_h  [int];
  logic            sel_h  [int];

  input_channels #(.IN_W(IN_W), .TS_W(TS_W)) dut (
    .clk, .rst_n, .sut_in, .ext_ch7, .ch7_ext, .ts, .ovf_toggle, .sample
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IN_W-1:0] ch;
    logic [IN_W+TS_W-1:0] exp_s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      // drive new inputs
      sut_in     = IN_W'($urandom) & 7'h7f;
      ext_ch7    = 1'($urandom);
      ovf_toggle = 1'($urandom);
      ts         = TS_W'($urandom);
      if (n % 100 == 0) ch7_ext = ~ch7_ext;
      @(posedge clk);
      pins_h[n] = {ext_ch7, sut_in};
      ts_h[n]   = ts;
      tog_h[n]  = ovf_toggle;
      sel_h[n]  = ch7_ext;
      @(negedge clk);
      // sample loaded at edge n: pins from edge n-2, the rest from edge n
      if (n >= 2) begin
        ch = pins_h[n-2];
        if (!sel_h[n]) ch[IN_W-1] = tog_h[n];
        exp_s = {ch, ts_h[n]};
        checks++;
        if (sample !== exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL edge %0d: sample %h expected %h", n, sample, exp_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
