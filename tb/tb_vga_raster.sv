// tb_vga_raster: loads images into the VGA peripheral over Avalon, the way the
// CPU software does (width = 1 and height = 1, then address/pixel pairs at
// byte addresses 0, 2, 4, ..., then the real width and height), and checks
// whole frames of the DAC outputs slot by slot against a screen computed
// by the testbench: sync pulses, blanking, the image centred on 640x480
// with its pixels in raster order, the background colour (first pixel)
// around it, black outside the visible area and colour widening 5 -> 10 bits.
// Outputs are expected three read edges after the raster slot they show.
// Only frames that start after the last register write are compared. The
// first image is checked while still loading (width = 1: all background).
module tb_vga_raster;
  import imagic_pkg::*;

  localparam int FRAME = 800 * 525;

  logic clk = 0, rst_n = 0;
  avs_req_t avs_req = '0;
  avs_rsp_t avs_rsp;
  logic [SRAM_ADDR_W-1:0] sram_addr;
  logic [SRAM_DATA_W-1:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_ub_n, sram_lb_n;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  vga_raster dut (.clk, .rst_n, .avs_req, .avs_rsp, .sram_addr, .sram_dq_o,
                  .sram_dq_oe, .sram_dq_i, .sram_we_n, .sram_oe_n, .sram_ce_n,
                  .sram_ub_n, .sram_lb_n, .vga_clk, .vga_hs_n, .vga_vs_n,
                  .vga_blank_n, .vga_sync_n, .vga_r, .vga_g, .vga_b);

  sram_model u_mem (.addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i), .we_n(sram_we_n));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #600_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected screen
  int          img_w = 1, img_h = 1;
  logic [15:0] img [];
  logic [15:0] bg_px = 0;
  int          m = 0;          // read edges seen since reset
  int          last_wr = 0;    // value of m at the last register write
  int          checked_frames = 0;

  function automatic logic [9:0] wide(input logic [4:0] c);
    logic [9:0] r;
    r = '0;
    for (int i = 0; i < 5; i++) r[4 + i] = c[i];
    for (int i = 0; i < 4; i++) r[i] = c[i + 1];
    return r;
  endfunction

  always @(negedge clk) if (rst_n && vga_clk) begin : mon
    int j, h, v, x0, y0;
    logic [15:0] px;
    bit vis, in_img;
    @(posedge clk); #1;
    m++;
    j = m - 3;
    if (j >= 0 && (j / FRAME) > (last_wr / FRAME)) begin
      h = j % 800; v = (j / 800) % 525;
      x0 = 464 - img_w / 2; y0 = 275 - img_h / 2;
      vis = h >= 144 && h < 784 && v >= 35 && v < 515;
      in_img = h >= x0 && h < x0 + img_w && v >= y0 && v < y0 + img_h;
      check(vga_hs_n == !(h < 96), "hsync");
      check(vga_vs_n == !(v < 2), "vsync");
      check(vga_blank_n == !(h < 96 || v < 2), "blank");
      check(vga_sync_n == 0, "sync tied low");
      if (in_img && img_w != 1) px = img[(v - y0) * img_w + (h - x0)];
      else                      px = bg_px;
      if (vis || in_img)
        check(vga_r == wide(px[14:10]) && vga_g == wide(px[9:5]) && vga_b == wide(px[4:0]),
              "pixel colour");
      else
        check(vga_r == 0 && vga_g == 0 && vga_b == 0, "black outside the screen");
      if (j % FRAME == FRAME - 1) checked_frames++;
    end
  end

  task automatic avs_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_req.chipselect = 1; avs_req.write = 1; avs_req.address = a; avs_req.writedata = d;
    #1;
    while (avs_rsp.waitrequest) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    avs_req = '0;
    last_wr = m;
  endtask

  task automatic load_image(input int w, input int h, input int seed);
    logic [15:0] px [];
    px = new[w * h];
    for (int i = 0; i < w * h; i++) px[i] = 16'((i * 37 + seed * 1001) ^ (i << 7)) & 16'h7fff;
    avs_write(REG_WIDTH, 1);
    avs_write(REG_HEIGHT, 1);
    for (int i = 0; i < w * h; i++) begin
      avs_write(REG_ADDR_LO, 32'((2 * i) & 'hffff));
      avs_write(REG_ADDR_HI, 32'((2 * i) >> 16));
      avs_write(REG_PIXEL, 32'(px[i]));
      if (i == 0) begin
        // still loading: the whole screen shows the new background
        img_w = 1; img_h = 1; bg_px = px[0];
        wait_frames(2);
      end
    end
    avs_write(REG_WIDTH, 32'(w));
    avs_write(REG_HEIGHT, 32'(h));
    img = px; img_w = w; img_h = h;
    wait_frames(2);
  endtask

  task automatic wait_frames(input int n);
    int target;
    target = checked_frames + n - 1;
    wait (checked_frames >= target + 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_image(21, 13, 1);
    load_image(64, 48, 2);
    check(checked_frames >= 4, "frames compared");
    $display("frames compared: %0d", checked_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
