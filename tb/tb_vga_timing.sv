// tb_vga_timing: runs vga_timing at its default 640x480 settings for two full
// frames with a pixel enable on every other clock, and checks against a
// reference raster position kept by the testbench: the counters, the sync
// widths (96 slots, 2 lines), the visible window (640 x 480 per frame), the
// end-of-line/end-of-field flags and the frame length of 800 x 525 slots.
module tb_vga_timing;
  import imagic_pkg::*;

  logic clk = 0, rst_n = 0, pix_ce = 0;
  logic [9:0] hcount, vcount;
  logic hsync, vsync, active_h, active_v, eol, eof;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst_n, .pix_ce, .hcount, .vcount, .hsync, .vsync,
                  .active_h, .active_v, .end_of_line(eol), .end_of_field(eof));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t h=%0d v=%0d", what, $time, hcount, vcount);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, visible, hs_slots, vs_slots, frames;
    repeat (3) @(posedge clk);
    rst_n = 1;
    h = 0; v = 0; visible = 0; hs_slots = 0; vs_slots = 0; frames = 0;
    while (frames < 2) begin
      @(negedge clk);
      pix_ce = ~pix_ce;
      if (pix_ce) begin
        // check the slot the DUT is showing before this enable
        check(hcount == 10'(h) && vcount == 10'(v), "counter");
        check(hsync == (h < 96), "hsync");
        check(vsync == (v < 2), "vsync");
        check(active_h == (h >= 144 && h < 784), "active_h");
        check(active_v == (v >= 35 && v < 515), "active_v");
        check(eol == (h == 799), "end_of_line");
        check(eof == (v == 524), "end_of_field");
        if (active_h && active_v) visible++;
        if (hsync && v == 100) hs_slots++;
        if (vsync && h == 0) vs_slots++;
        h++;
        if (h == 800) begin
          h = 0; v++;
          if (v == 525) begin
            v = 0; frames++;
            check(visible == 640 * 480, "visible pixel count");
            check(hs_slots == 96, "hsync width");
            check(vs_slots == 2, "vsync lines");
            visible = 0; hs_slots = 0; vs_slots = 0;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
