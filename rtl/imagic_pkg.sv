// imagic_pkg: types and constants shared by the image display system.
//
// The system is a slideshow viewer: a CPU decodes JPEG files read from an
// SD card and hands the pixels to a VGA peripheral that owns an external
// SRAM frame store. This package holds
//   * the Avalon-MM slave request/response bundle used by every peripheral,
//   * the register map of the VGA peripheral (word offsets 0..4),
//   * the 640x480@60 VGA timing constants (25 MHz pixel clock, 800x525),
//   * the 15-bit RGB pixel format and its widening to the DAC's colour bus.
// The register map, the 5-5-5 pixel format, the timing constants and the
// colour widening (5 bits copied to the top of a 9-bit value, the upper four
// repeated below them) follow the document. The packed Avalon structs are this
// design's own way of carrying the bus.
package imagic_pkg;

  // ---------------------------------------------------------------- Avalon
  localparam int unsigned AVS_ADDR_W = 5;   // per-slave word address
  localparam int unsigned AVS_DATA_W = 32;

  typedef struct packed {
    logic                  chipselect;
    logic                  write;
    logic                  read;
    logic [AVS_ADDR_W-1:0] address;
    logic [AVS_DATA_W-1:0] writedata;
  } avs_req_t;

  typedef struct packed {
    logic [AVS_DATA_W-1:0] readdata;
    logic                  waitrequest;
  } avs_rsp_t;

  // ------------------------------------------- VGA peripheral registers
  typedef enum logic [AVS_ADDR_W-1:0] {
    REG_PIXEL   = 5'd0,  // 15-bit pixel written to SRAM at the write address
    REG_ADDR_LO = 5'd1,  // SRAM write address bits 15:0
    REG_ADDR_HI = 5'd2,  // SRAM write address bits 17:16
    REG_WIDTH   = 5'd3,  // image width; 1 means "new image being loaded"
    REG_HEIGHT  = 5'd4   // image height
  } vga_reg_e;

  localparam int unsigned SRAM_ADDR_W = 18;  // 256K words
  localparam int unsigned SRAM_DATA_W = 16;
  localparam int unsigned DIM_W       = 9;   // width / height registers

  // ----------------------------------------------------------- VGA timing
  localparam int unsigned HTOTAL       = 800;
  localparam int unsigned HSYNC        = 96;
  localparam int unsigned HBACK_PORCH  = 48;
  localparam int unsigned HACTIVE      = 640;
  localparam int unsigned HFRONT_PORCH = 16;
  localparam int unsigned VTOTAL       = 525;
  localparam int unsigned VSYNC        = 2;
  localparam int unsigned VBACK_PORCH  = 33;
  localparam int unsigned VACTIVE      = 480;
  localparam int unsigned VFRONT_PORCH = 10;

  // ---------------------------------------------------------------- pixel
  typedef struct packed {
    logic       unused;  // bit 15, not used
    logic [4:0] r;       // bits 14:10
    logic [4:0] g;       // bits 9:5
    logic [4:0] b;       // bits 4:0
  } rgb555_t;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb_dac_t;

  // Widen a 5-bit component to the DAC's 10-bit input: bits 8:4 take the
  // component, bits 3:0 repeat its upper four bits, bit 9 stays 0.
  function automatic logic [9:0] widen5(input logic [4:0] c);
    return {1'b0, c, c[4:1]};
  endfunction

  function automatic rgb_dac_t widen_rgb(input rgb555_t p);
    return '{r: widen5(p.r), g: widen5(p.g), b: widen5(p.b)};
  endfunction

endpackage
