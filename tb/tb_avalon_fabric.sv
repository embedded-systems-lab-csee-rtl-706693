// tb_avalon_fabric: random master accesses against five stand-in slaves,
// each returning its own readdata and a random waitrequest. Checks that only
// the slave named by address bits 7:5 sees chipselect (and none for an idle
// master), that offset, read, write and writedata reach the slaves unchanged,
// and that readdata and waitrequest come back from the selected slave, or 0
// for the unmapped windows 5..7.
module tb_avalon_fabric;
  import imagic_pkg::*;

  logic [7:0] m_address;
  logic m_read, m_write, m_waitrequest;
  logic [31:0] m_writedata, m_readdata;
  avs_req_t s_req [5];
  avs_rsp_t s_rsp [5];
  int checks = 0, failures = 0;

  avalon_fabric dut (.m_address, .m_read, .m_write, .m_writedata, .m_readdata,
                     .m_waitrequest, .s_req, .s_rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%h", what, m_address);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel;
    for (int n = 0; n < 2000; n++) begin
      m_address = 8'($urandom);
      m_read = 1'($urandom); m_write = !m_read && 1'($urandom);
      m_writedata = $urandom;
      for (int i = 0; i < 5; i++) begin
        s_rsp[i].readdata = 32'h1000_0000 * (i + 1) + 32'($urandom & 'hffff);
        s_rsp[i].waitrequest = 1'($urandom);
      end
      #1;
      sel = m_address / 32;
      for (int i = 0; i < 5; i++) begin
        check(s_req[i].chipselect == (i == sel && (m_read || m_write)), "chipselect decode");
        check(s_req[i].address == m_address % 32 && s_req[i].writedata == m_writedata &&
              s_req[i].read == m_read && s_req[i].write == m_write, "request fields");
      end
      if (sel < 5) begin
        check(m_readdata == s_rsp[sel].readdata, "readdata mux");
        check(m_waitrequest == s_rsp[sel].waitrequest, "waitrequest mux");
      end else begin
        check(m_readdata == 0 && m_waitrequest == 0, "unmapped window");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
