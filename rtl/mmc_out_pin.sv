// mmc_out_pin: a one-bit, write-only Avalon peripheral that drives one SD card
// pin.
//
// The SD card is run in SPI mode entirely by software: the CPU toggles the
// card's clock, command/data-in and chip-select lines one write at a time and
// reads the data-out line back. Three instances of this module provide
// SD_CLK, SD_CMD (card data in) and SD_DAT3 (chip select, active low).
// A write with chipselect sets the pin to writedata bit 0 on the next clock
// edge; the register offset is ignored. The slave never stalls and has no
// readable state (readdata is 0).
//
// Taking only writedata bit 0 and ignoring the offset follows the document.
// The reset value (parameter RESET_VALUE) is this design's choice, since the
// document's pin registers have no reset: chip select and command idle high,
// the clock idles low.
module mmc_out_pin
  import imagic_pkg::*;
#(
  parameter logic RESET_VALUE = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avs_req_t avs_req,
  output avs_rsp_t avs_rsp,
  output logic     pin
);

  assign avs_rsp.readdata    = '0;
  assign avs_rsp.waitrequest = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  pin <= RESET_VALUE;
    else if (avs_req.chipselect && avs_req.write) pin <= avs_req.writedata[0];
  end

endmodule
