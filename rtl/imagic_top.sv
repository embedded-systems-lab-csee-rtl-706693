// imagic_top: the image slideshow system around a CPU. JPEG files are read
// from an SD card, decoded in software and shown one after another on a VGA
// monitor, centred, with the rest of the screen painted in the image's first
// pixel colour.
//
// The CPU (a soft processor running from SDRAM, not part of this RTL) reaches
// the peripherals through its Avalon data master, brought out here as the
// avm_* ports. The fabric decodes the word address: bits 7:5 pick the slave,
// bits 4:0 the register.
//   slave 0  vga_raster   (VGA peripheral and SRAM frame store)
//   slave 1  SD_CLK pin   (write bit 0)
//   slave 2  SD_CMD pin   (write bit 0)
//   slave 3  SD_DAT pin   (read bit 0)
//   slave 4  SD_DAT3 pin  (write bit 0, card chip select)
// The SDRAM controller and its chip belong to the CPU's memory system and are
// not included; the PLL that derives the SDRAM clock (leading the system clock
// by 3 ns) is included as a behavioural model and drives dram_clk. The
// seven-segment displays show the fixed word "HELLO" (active-low segments
// g..a), as on the board.
//
// Everything runs from the 50 MHz clk_50; the VGA peripheral derives the
// 25 MHz pixel clock itself. The SRAM data bus is split into sram_dq_o,
// sram_dq_oe and sram_dq_i; a pad (sram_dq = sram_dq_oe ? sram_dq_o : 'z)
// joins them on a board. The block structure and the slave set follow the
// document; the address map, the split data bus and the reset input (the
// document ties reset off) are this design's choices.
module imagic_top
  import imagic_pkg::*;
(
  input  logic                   clk_50,
  input  logic                   rst_n,
  // CPU data master
  input  logic [7:0]             avm_address,
  input  logic                   avm_read,
  input  logic                   avm_write,
  input  logic [AVS_DATA_W-1:0]  avm_writedata,
  output logic [AVS_DATA_W-1:0]  avm_readdata,
  output logic                   avm_waitrequest,
  // SD card socket
  output logic                   sd_clk,
  output logic                   sd_cmd,
  input  logic                   sd_dat,
  output logic                   sd_dat3,
  // SRAM chip
  output logic [SRAM_ADDR_W-1:0] sram_addr,
  output logic [SRAM_DATA_W-1:0] sram_dq_o,
  output logic                   sram_dq_oe,
  input  logic [SRAM_DATA_W-1:0] sram_dq_i,
  output logic                   sram_we_n,
  output logic                   sram_oe_n,
  output logic                   sram_ce_n,
  output logic                   sram_ub_n,
  output logic                   sram_lb_n,
  // VGA DAC
  output logic                   vga_clk,
  output logic                   vga_hs_n,
  output logic                   vga_vs_n,
  output logic                   vga_blank_n,
  output logic                   vga_sync_n,
  output logic [9:0]             vga_r,
  output logic [9:0]             vga_g,
  output logic [9:0]             vga_b,
  // SDRAM clock
  output logic                   dram_clk,
  // Seven-segment displays, digit 7 (leftmost) to 0
  output logic [7:0][6:0]        hex_n
);

  localparam int unsigned N_SLAVES = 5;

  avs_req_t s_req [N_SLAVES];
  avs_rsp_t s_rsp [N_SLAVES];
  avs_req_t sd_req [4];
  avs_rsp_t sd_rsp [4];

  avalon_fabric #(.N_SLAVES(N_SLAVES), .SEL_W(3)) u_fabric (
    .m_address(avm_address), .m_read(avm_read), .m_write(avm_write),
    .m_writedata(avm_writedata), .m_readdata(avm_readdata),
    .m_waitrequest(avm_waitrequest), .s_req, .s_rsp
  );

  vga_raster u_vga (
    .clk(clk_50), .rst_n, .avs_req(s_req[0]), .avs_rsp(s_rsp[0]),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_we_n,
    .sram_oe_n, .sram_ce_n, .sram_ub_n, .sram_lb_n,
    .vga_clk, .vga_hs_n, .vga_vs_n, .vga_blank_n, .vga_sync_n,
    .vga_r, .vga_g, .vga_b
  );

  for (genvar i = 0; i < 4; i++) begin : g_sd
    assign sd_req[i]   = s_req[i+1];
    assign s_rsp[i+1]  = sd_rsp[i];
  end

  sd_card_ctrl u_sd (
    .clk(clk_50), .rst_n, .avs_req(sd_req), .avs_rsp(sd_rsp),
    .sd_clk, .sd_cmd, .sd_dat, .sd_dat3
  );

  sdram_pll u_pll (.inclk0(clk_50), .c0(dram_clk));

  // "HELLO" on the five leftmost digits, the rest blank.
  assign hex_n = {7'b0001001, 7'b0000110, 7'b1000111, 7'b1000111,
                  7'b1000000, 7'b1111111, 7'b1111111, 7'b1111111};

endmodule
