// image_window: centres the stored image on the screen and generates the
// SRAM read address for it.
//
// The image is width x height pixels and is placed so that its centre is the
// screen centre (MID_X, MID_Y) = (320, 240): the left edge is at
// MID_X - width/2 and the top edge at MID_Y - height/2, both counted from the
// first visible column/line. in_image is high while the raster is inside
// that rectangle. rd_addr is the SRAM address of the pixel under the raster:
// it starts at 0, steps by ADDR_STEP after every pixel slot spent inside the
// image, and returns to 0 after the last slot of the frame, so an image
// stored row by row from address 0 is read out in raster order.
//
// Timing: in_image is combinational from the raster counters; rd_addr is a
// register updated on pix_ce cycles and refers to the current slot.
//
// Centring arithmetic, the 18-bit address, the step of 2 (the CPU writes byte
// addresses 0, 2, 4, ... and the address is passed to the 16-bit SRAM as is)
// and the clear at the end of the frame follow the document. Using a
// combinational window compare instead of registered set/reset flags is this
// design's choice. Widths or heights larger than the visible area give a
// negative start; the compare is done in signed arithmetic so that such an
// image is clipped instead of wrapping.
module image_window
  import imagic_pkg::*;
#(
  parameter int unsigned H_START   = HSYNC + HBACK_PORCH,  // first visible column
  parameter int unsigned V_START   = VSYNC + VBACK_PORCH,  // first visible line
  parameter int unsigned MID_X     = HACTIVE / 2,
  parameter int unsigned MID_Y     = VACTIVE / 2,
  parameter int unsigned ADDR_STEP = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   pix_ce,
  input  logic [9:0]             hcount,
  input  logic [9:0]             vcount,
  input  logic                   end_of_line,
  input  logic                   end_of_field,
  input  logic [DIM_W-1:0]       width,
  input  logic [DIM_W-1:0]       height,
  output logic                   in_image,
  output logic [SRAM_ADDR_W-1:0] rd_addr
);

  logic signed [11:0] x0, y0, x1, y1, h, v;

  always_comb begin
    x0 = $signed(12'(H_START + MID_X)) - $signed(12'(width  >> 1));
    y0 = $signed(12'(V_START + MID_Y)) - $signed(12'(height >> 1));
    x1 = x0 + $signed(12'(width));
    y1 = y0 + $signed(12'(height));
    h  = $signed(12'(hcount));
    v  = $signed(12'(vcount));
    in_image = (h >= x0) && (h < x1) && (v >= y0) && (v < y1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
    end else if (pix_ce) begin
      if (end_of_line && end_of_field) rd_addr <= '0;
      else if (in_image)               rd_addr <= rd_addr + SRAM_ADDR_W'(ADDR_STEP);
    end
  end

endmodule
