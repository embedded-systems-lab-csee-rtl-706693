// tb_sd_card_ctrl: plays the CPU software against the four pin peripherals
// and a model of an SD card in SPI mode. It checks the pin reset levels,
// sends the 80 wake-up clocks with chip select high, then CMD0
// (40 00 00 00 00 95) and CMD1 (41 00 00 00 00 FF) with chip select low, one
// pin write per bit and clock edge, and reads the R1 responses back one bit
// per read of the data-out peripheral: 01h (idle) after CMD0, then CMD1 is
// repeated until it returns 00h (ready). The card model must have received
// the command bytes exactly.
module tb_sd_card_ctrl;
  import imagic_pkg::*;

  logic clk = 0, rst_n = 0;
  avs_req_t avs_req [4];
  avs_rsp_t avs_rsp [4];
  logic sd_clk, sd_cmd, sd_dat, sd_dat3;
  int checks = 0, failures = 0;

  sd_card_ctrl dut (.clk, .rst_n, .avs_req, .avs_rsp, .sd_clk, .sd_cmd, .sd_dat, .sd_dat3);
  spi_card_model card (.sclk(sd_clk), .cs_n(sd_dat3), .mosi(sd_cmd), .miso(sd_dat));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pin_write(input int s, input logic v);
    @(negedge clk);
    avs_req[s] = '{chipselect: 1, write: 1, read: 0, address: '0, writedata: 32'(v)};
    @(posedge clk); #1;
    avs_req[s] = '0;
  endtask

  task automatic pin_read(output logic v);
    @(negedge clk);
    avs_req[2] = '{chipselect: 1, write: 0, read: 1, address: '0, writedata: '0};
    #1 v = avs_rsp[2].readdata[0];
    check(avs_rsp[2].readdata[31:1] == 0 && !avs_rsp[2].waitrequest, "read format");
    @(posedge clk); #1;
    avs_req[2] = '0;
  endtask

  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      pin_write(1, b[i]);
      pin_write(0, 1'b1);
      pin_write(0, 1'b0);
    end
  endtask

  task automatic recv_byte(output logic [7:0] b);
    logic v;
    for (int i = 7; i >= 0; i--) begin
      pin_write(0, 1'b1);
      pin_read(v);
      b[i] = v;
      pin_write(0, 1'b0);
    end
  endtask

  task automatic command(input logic [47:0] frame, output logic [7:0] r1);
    for (int i = 5; i >= 0; i--) send_byte(frame[i*8 +: 8]);
    r1 = 8'hff;
    for (int i = 0; i < 8 && r1 == 8'hff; i++) recv_byte(r1);
    check(card.last_cmd == frame, "card received the command frame");
    send_byte(8'hff);   // 8 clocks after the response
  endtask

  initial begin
    logic [7:0] r1;
    int tries;
    for (int i = 0; i < 4; i++) avs_req[i] = '0;
    repeat (2) @(posedge clk);
    #1 check(sd_clk == 0 && sd_cmd == 1 && sd_dat3 == 1, "pin reset levels");
    rst_n = 1;
    // 80 clocks with chip select high
    pin_write(3, 1'b1);
    pin_write(1, 1'b1);
    repeat (80) begin pin_write(0, 1'b1); pin_write(0, 1'b0); end
    check(card.ncmds == 0, "no command while deselected");
    pin_write(3, 1'b0);
    check(sd_dat3 == 0, "chip select asserted");
    command(48'h40_00000000_95, r1);
    check(r1 == 8'h01, "CMD0 answers idle");
    tries = 0;
    do begin
      command(48'h41_00000000_ff, r1);
      tries++;
    end while (r1 != 8'h00 && tries < 5);
    check(r1 == 8'h00 && tries == 2, "CMD1 reaches ready on the second try");
    check(card.ncmds == 3, "three command frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
