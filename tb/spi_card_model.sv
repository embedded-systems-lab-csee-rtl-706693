// spi_card_model: simulation-only model of an MMC/SD card in SPI mode, just
// enough to exercise a bit-banged host. While cs_n is low it samples mosi on
// each rising sclk edge; a 0 bit on an idle line starts a 48-bit command
// frame. After a complete frame it answers with 8 clocks of 1s followed by
// the 8-bit R1 response, shifted out MSB first on falling sclk edges:
// 01h (idle) to CMD0 and to the first CMD1, 00h (ready) afterwards and to
// every other command. The last command frame and a count of frames are kept
// for the testbench.
module spi_card_model (
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);
  logic [47:0] rx = '0;
  int          nbits = 0;
  logic [47:0] last_cmd = '0;
  int          ncmds = 0;
  int          ncmd1 = 0;
  bit          outq [$];

  initial miso = 1'b1;

  always @(posedge sclk) if (!cs_n) begin
    if (nbits > 0 || mosi == 1'b0) begin
      rx = {rx[46:0], mosi};
      nbits++;
      if (nbits == 48) begin : frame
        logic [7:0] r1;
        nbits = 0;
        last_cmd = rx;
        ncmds++;
        if (rx[45:40] == 6'd0) r1 = 8'h01;
        else if (rx[45:40] == 6'd1) begin
          r1 = (ncmd1 == 0) ? 8'h01 : 8'h00;
          ncmd1++;
        end else r1 = 8'h00;
        repeat (8) outq.push_back(1'b1);
        for (int i = 7; i >= 0; i--) outq.push_back(r1[i]);
      end
    end
  end

  always @(negedge sclk) if (!cs_n) miso <= (outq.size() > 0) ? outq.pop_front() : 1'b1;
endmodule
