// vga_raster: the VGA peripheral. It owns the SRAM frame store, accepts image
// data from the CPU over Avalon and scans the stored image out to the VGA DAC,
// centred on a 640x480 screen with the rest of the screen filled by a
// background colour equal to the image's first pixel.
//
// Structure: a toggle divides the 50 MHz bus clock into the 25 MHz pixel
// clock (`ph`). vga_timing walks the raster one slot per pixel clock,
// image_window decides which slots fall inside the image and supplies the
// SRAM read address, and sram_ctrl interleaves one pixel fetch and one CPU
// write per pixel period.
//
// Pipeline (in pixel periods): the read for raster slot k is issued at the
// end of slot k, its data is latched one period later, and the DAC registers
// are loaded one period after that. The sync, blank and window flags of slot
// k are delayed through two registers so that they leave together with its
// pixel: every output lags the raster counters by two pixel periods.
//
// Outputs: vga_clk is the 25 MHz clock (its rising edge falls in the middle of
// each pixel), vga_hs_n/vga_vs_n are active-low syncs, vga_blank_n is low only
// during the sync pulses and vga_sync_n is held at 0, as in the document.
// Colours are 10 bits per channel: bits 8:4 carry the 5-bit component, bits
// 3:0 repeat its upper four bits, bit 9 is 0 (Figure 9 of the document).
// Inside the image the stored pixel is shown (the background while the width
// register is 1, i.e. while an image is being loaded); elsewhere in the
// visible area the background colour; black outside the visible area (the
// document holds the last colour there -- black is this design's choice).
module vga_raster
  import imagic_pkg::*;
#(
  parameter int unsigned ADDR_STEP = 2
) (
  input  logic                   clk,       // 50 MHz bus clock
  input  logic                   rst_n,
  input  avs_req_t               avs_req,
  output avs_rsp_t               avs_rsp,
  // SRAM pins
  output logic [SRAM_ADDR_W-1:0] sram_addr,
  output logic [SRAM_DATA_W-1:0] sram_dq_o,
  output logic                   sram_dq_oe,
  input  logic [SRAM_DATA_W-1:0] sram_dq_i,
  output logic                   sram_we_n,
  output logic                   sram_oe_n,
  output logic                   sram_ce_n,
  output logic                   sram_ub_n,
  output logic                   sram_lb_n,
  // VGA DAC pins
  output logic                   vga_clk,
  output logic                   vga_hs_n,
  output logic                   vga_vs_n,
  output logic                   vga_blank_n,
  output logic                   vga_sync_n,
  output logic [9:0]             vga_r,
  output logic [9:0]             vga_g,
  output logic [9:0]             vga_b
);

  typedef struct packed {
    logic hsync;
    logic vsync;
    logic visible;
    logic in_image;
  } slot_t;

  logic                   ph;
  logic [9:0]             hcount, vcount;
  logic                   hsync, vsync, active_h, active_v, eol, eof;
  logic                   in_image;
  logic [SRAM_ADDR_W-1:0] rd_addr;
  rgb555_t                pixel, bg;
  logic [DIM_W-1:0]       width, height;
  logic                   read_skipped;   // lost-fetch flag: kept for debug
                                          // probes, not needed by the colour
                                          // path (the background hides it)
  slot_t                  slot_now, slot_d1, slot_d2;
  rgb_dac_t               colour;

  // 25 MHz pixel clock: ph = 1 in the bus cycle that ends a pixel period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 1'b0;
    else        ph <= ~ph;
  end

  vga_timing u_timing (
    .clk, .rst_n, .pix_ce(ph),
    .hcount, .vcount, .hsync, .vsync, .active_h, .active_v,
    .end_of_line(eol), .end_of_field(eof)
  );

  image_window #(.ADDR_STEP(ADDR_STEP)) u_window (
    .clk, .rst_n, .pix_ce(ph),
    .hcount, .vcount, .end_of_line(eol), .end_of_field(eof),
    .width, .height, .in_image, .rd_addr
  );

  sram_ctrl u_sram (
    .clk, .rst_n, .ph, .rd_addr, .avs_req, .avs_rsp,
    .pixel, .bg, .width, .height, .read_skipped,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_we_n,
    .sram_oe_n, .sram_ce_n, .sram_ub_n, .sram_lb_n
  );

  assign slot_now = '{hsync: hsync, vsync: vsync,
                      visible: active_h && active_v, in_image: in_image};

  always_comb begin
    if (slot_d2.in_image && width != DIM_W'(1)) colour = widen_rgb(pixel);
    else if (slot_d2.in_image || slot_d2.visible) colour = widen_rgb(bg);
    else colour = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_d1     <= '0;
      slot_d2     <= '0;
      vga_hs_n    <= 1'b1;
      vga_vs_n    <= 1'b1;
      vga_blank_n <= 1'b1;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
    end else if (ph) begin
      slot_d1     <= slot_now;
      slot_d2     <= slot_d1;
      vga_hs_n    <= ~slot_d2.hsync;
      vga_vs_n    <= ~slot_d2.vsync;
      vga_blank_n <= ~(slot_d2.hsync | slot_d2.vsync);
      vga_r       <= colour.r;
      vga_g       <= colour.g;
      vga_b       <= colour.b;
    end
  end

  assign vga_clk    = ph;
  assign vga_sync_n = 1'b0;

endmodule
