// tb_image_window: drives image_window with a raster it generates itself
// (800 x 525 slots, visible area from column 144 and line 35) for several
// image sizes -- even, odd, the 1 x 1 loading size and the largest 511 x 480
// -- and checks, slot by slot, the window flag against the centring rule
// left = 144 + 320 - width/2, top = 35 + 240 - height/2, the read address
// (2 x the number of image slots already scanned this frame) and its return to
// 0 after the last slot of the frame.
module tb_image_window;
  import imagic_pkg::*;

  logic clk = 0, rst_n = 0, pix_ce = 0;
  logic [9:0] hcount = 0, vcount = 0;
  logic eol, eof, in_image;
  logic [DIM_W-1:0] width, height;
  logic [SRAM_ADDR_W-1:0] rd_addr;
  int checks = 0, failures = 0;

  image_window dut (.clk, .rst_n, .pix_ce, .hcount, .vcount,
                    .end_of_line(eol), .end_of_field(eof),
                    .width, .height, .in_image, .rd_addr);

  assign eol = (hcount == 799);
  assign eof = (vcount == 524);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s h=%0d v=%0d w=%0d ht=%0d addr=%0d",
                                  what, hcount, vcount, width, height, rd_addr);
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame with pix_ce on every other clock; returns after the frame.
  task automatic run_frame(input int w, input int ht);
    int x0, y0, in_win, n;
    x0 = 144 + 320 - w / 2;
    y0 = 35 + 240 - ht / 2;
    n = 0;
    width = DIM_W'(w); height = DIM_W'(ht);
    for (int v = 0; v < 525; v++)
      for (int h = 0; h < 800; h++) begin
        @(negedge clk);
        hcount = 10'(h); vcount = 10'(v);
        pix_ce = 1'b0;
        @(negedge clk);
        in_win = (h >= x0 && h < x0 + w && v >= y0 && v < y0 + ht);
        check(in_image == in_win[0], "in_image");
        check(rd_addr == SRAM_ADDR_W'(2 * n), "rd_addr");
        if (in_win) n++;
        pix_ce = 1'b1;
      end
    @(negedge clk);
    pix_ce = 1'b0;
    check(rd_addr == 0, "rd_addr cleared at end of frame");
    check(n == w * ht, "image slot count");
  endtask

  initial begin
    width = 1; height = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(100, 60);
    run_frame(33, 17);
    run_frame(1, 1);
    run_frame(511, 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
