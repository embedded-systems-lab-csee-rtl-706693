// sd_card_ctrl: the SD card controller, four one-bit Avalon slaves through
// which software bit-bangs the card's SPI protocol.
//
// Slave 0 drives SD_CLK, slave 1 drives SD_CMD (card data in), slave 2 reads
// SD_DAT (card data out) and slave 3 drives SD_DAT3 (chip select, active
// low). Everything above the pin level -- the 80 initial clocks, CMD0 with its
// fixed CRC byte 95h, CMD1 polling, SET_BLOCKLEN, waiting for the FEh data
// token and byte alignment -- is done by the CPU, one pin write or read at a
// time. Each slave has its own chipselect from the bus fabric.
//
// The split into four single-pin peripherals follows the document; the reset
// levels (clock low, command and chip select high) are this design's choice.
module sd_card_ctrl
  import imagic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  avs_req_t avs_req [4],
  output avs_rsp_t avs_rsp [4],
  output logic     sd_clk,
  output logic     sd_cmd,
  input  logic     sd_dat,
  output logic     sd_dat3
);

  mmc_out_pin #(.RESET_VALUE(1'b0)) u_clk (
    .clk, .rst_n, .avs_req(avs_req[0]), .avs_rsp(avs_rsp[0]), .pin(sd_clk));

  mmc_out_pin #(.RESET_VALUE(1'b1)) u_datain (
    .clk, .rst_n, .avs_req(avs_req[1]), .avs_rsp(avs_rsp[1]), .pin(sd_cmd));

  mmc_in_pin u_dataout (
    .clk, .rst_n, .avs_req(avs_req[2]), .avs_rsp(avs_rsp[2]), .pin(sd_dat));

  mmc_out_pin #(.RESET_VALUE(1'b1)) u_ncs (
    .clk, .rst_n, .avs_req(avs_req[3]), .avs_rsp(avs_rsp[3]), .pin(sd_dat3));

endmodule
