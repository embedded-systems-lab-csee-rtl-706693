// tb_mmc_out_pin: checks the one-bit output peripheral: the reset level, that
// a write with chipselect copies writedata bit 0 to the pin one clock later
// whatever the offset and upper bits, that writes without chipselect and reads
// leave the pin alone, and that the slave never stalls.
module tb_mmc_out_pin;
  import imagic_pkg::*;

  logic clk = 0, rst_n = 0, pin;
  avs_req_t avs_req = '0;
  avs_rsp_t avs_rsp;
  int checks = 0, failures = 0;

  mmc_out_pin #(.RESET_VALUE(1'b1)) dut (.clk, .rst_n, .avs_req, .avs_rsp, .pin);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
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
    logic expected, cs, wr, rd;
    logic [31:0] d;
    repeat (2) @(posedge clk);
    #1 check(pin == 1'b1, "reset level");
    rst_n = 1;
    expected = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      cs = 1'($urandom); wr = 1'($urandom); rd = !wr && 1'($urandom); d = $urandom;
      avs_req.chipselect = cs; avs_req.write = wr; avs_req.read = rd;
      avs_req.address = 5'($urandom); avs_req.writedata = d;
      #1 check(avs_rsp.waitrequest == 0, "never stalls");
      @(posedge clk); #1;
      if (cs && wr) expected = d[0];
      check(pin == expected, "pin value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
