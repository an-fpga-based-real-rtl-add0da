// tb_offset_bridge: random transfers through the bridge. The address must
// arrive reduced by the offset (modulo 2**32), everything else unchanged
// in both directions.
module tb_offset_bridge;
  localparam logic [31:0] OFFS = 32'h0800_0000;

  logic [31:0] s_address, s_writedata, s_readdata, m_address, m_writedata, m_readdata;
  logic        s_read, s_write, s_readdatavalid, s_waitrequest;
  logic        m_read, m_write, m_readdatavalid, m_waitrequest;
  logic [3:0]  s_byteenable, m_byteenable;
  int          checks = 0, failures = 0;

  offset_bridge #(.ADDR_W(32), .DATA_W(32), .ADDR_OFFSET(OFFS)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      s_address       = (n < 1000) ? OFFS + 32'($urandom_range(32'h001f_ffff)) : $urandom;
      s_read          = 1'($urandom);
      s_write         = 1'($urandom);
      s_writedata     = $urandom;
      s_byteenable    = 4'($urandom);
      m_readdata      = $urandom;
      m_readdatavalid = 1'($urandom);
      m_waitrequest   = 1'($urandom);
      #10;
      checks += 2;
      if (m_address != s_address - OFFS) begin
        failures++;
        $display("FAIL address %h -> %h", s_address, m_address);
      end
      if (!(m_read == s_read && m_write == s_write && m_writedata == s_writedata &&
            m_byteenable == s_byteenable && s_readdata == m_readdata &&
            s_readdatavalid == m_readdatavalid && s_waitrequest == m_waitrequest)) begin
        failures++;
        $display("FAIL pass-through signals");
      end
    end
    checks++;
    s_address = OFFS;
    #1;
    if (m_address != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
