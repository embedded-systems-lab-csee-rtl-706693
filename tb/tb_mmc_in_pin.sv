// tb_mmc_in_pin: checks the one-bit input peripheral: a read with chipselect
// returns, in bit 0, the pin level of one clock earlier with all other bits
// 0; without a read (or chipselect) readdata is 0; it never stalls.
module tb_mmc_in_pin;
  import imagic_pkg::*;

  logic clk = 0, rst_n = 0, pin = 1;
  avs_req_t avs_req = '0;
  avs_rsp_t avs_rsp;
  int checks = 0, failures = 0;

  mmc_in_pin dut (.clk, .rst_n, .avs_req, .avs_rsp, .pin);

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
    logic last_pin;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      pin = 1'($urandom);
      @(posedge clk);
      last_pin = pin;
      #1;
      avs_req.chipselect = 1'($urandom); avs_req.read = 1'($urandom);
      avs_req.write = 0; avs_req.address = 5'($urandom);
      pin = 1'($urandom);   // a later change must not show yet
      #1;
      check(avs_rsp.waitrequest == 0, "never stalls");
      if (avs_req.chipselect && avs_req.read)
        check(avs_rsp.readdata == 32'(last_pin), "read returns the sampled pin");
      else
        check(avs_rsp.readdata == 0, "idle readdata is 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
