// vga_timing: raster counters and sync/blank decode for a 640x480 display.
//
// Two counters walk the raster once per frame: hcount over HTOTAL pixel
// slots per line and vcount over VTOTAL lines per frame. Both advance only on
// cycles where pix_ce is high, so the module runs from the 50 MHz bus clock
// with a 25 MHz pixel enable. Line order follows the classic layout: sync
// pulse first, then back porch, active video, front porch. hsync/vsync are
// active high here (the pins are inverted further out); active_h/active_v
// are high over the visible 640 columns and 480 lines.
//
// Timing: counters are registers; every other output is decoded
// combinationally from them, so all outputs describe the current pixel slot.
// end_of_line/end_of_field mark the last slot of a line/frame.
//
// The 800/96/48/640/16 and 525/2/33/480/10 numbers are the document's. It
// builds the sync and blank flags as small registered set/reset machines,
// which lands the visible window one slot later than the decode used here;
// this design decodes the counters directly so the window is exactly
// [HSYNC+HBACK_PORCH, HSYNC+HBACK_PORCH+HACTIVE).
module vga_timing
  import imagic_pkg::*;
#(
  parameter int unsigned H_TOTAL  = HTOTAL,
  parameter int unsigned H_SYNC   = HSYNC,
  parameter int unsigned H_BACK   = HBACK_PORCH,
  parameter int unsigned H_ACTIVE = HACTIVE,
  parameter int unsigned V_TOTAL  = VTOTAL,
  parameter int unsigned V_SYNC   = VSYNC,
  parameter int unsigned V_BACK   = VBACK_PORCH,
  parameter int unsigned V_ACTIVE = VACTIVE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_ce,        // one pixel slot per asserted cycle
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,         // active high
  output logic       vsync,         // active high
  output logic       active_h,
  output logic       active_v,
  output logic       end_of_line,
  output logic       end_of_field
);

  assign end_of_line  = (hcount == 10'(H_TOTAL - 1));
  assign end_of_field = (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_ce) begin
      if (end_of_line) begin
        hcount <= '0;
        vcount <= end_of_field ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 10'd1;
      end
    end
  end

  always_comb begin
    hsync    = (hcount < 10'(H_SYNC));
    vsync    = (vcount < 10'(V_SYNC));
    active_h = (hcount >= 10'(H_SYNC + H_BACK)) &&
               (hcount <  10'(H_SYNC + H_BACK + H_ACTIVE));
    active_v = (vcount >= 10'(V_SYNC + V_BACK)) &&
               (vcount <  10'(V_SYNC + V_BACK + V_ACTIVE));
  end

endmodule
