// mmc_in_pin: a one-bit, read-only Avalon peripheral that returns the SD
// card's data-out line (SD_DAT, the card's MISO in SPI mode).
//
// The pin is sampled into a register on every bus clock edge; a read with
// chipselect returns that sample in readdata bit 0 with no wait states, so the
// value read is the pin as it was one bus clock earlier. Writes are ignored.
//
// Returning the pin in bit 0 follows the document. The document registers the
// pin only while a read is in progress, which returns the value of the
// previous read unless the bus inserts a wait state; sampling every cycle is
// this design's choice so that a zero-wait read returns a fresh value.
module mmc_in_pin
  import imagic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  avs_req_t avs_req,
  output avs_rsp_t avs_rsp,
  input  logic     pin
);

  logic sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= 1'b1;
    else        sample <= pin;
  end

  assign avs_rsp.waitrequest = 1'b0;
  assign avs_rsp.readdata    = (avs_req.chipselect && avs_req.read)
                               ? AVS_DATA_W'(sample) : '0;

endmodule
