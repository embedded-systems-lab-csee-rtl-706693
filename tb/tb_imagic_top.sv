// tb_imagic_top: end-to-end run of the whole system at its default sizes,
// with the testbench in the role of the CPU software.
//
//   1. SD card bring-up through the four pin peripherals behind the fabric:
//      80 clocks deselected, CMD0 -> R1 01h, CMD1 until R1 00h, CMD16
//      (block length 512) -> 00h, checked against an SPI card model.
//   2. A 40 x 30 image is loaded into the VGA peripheral as the software
//      does it (width = 1 and height = 1, then address/pixel pairs at byte
//      addresses 0, 2, 4, ..., then the real size); a frame is checked while
//      loading (all background) and one after (image centred, background
//      around it).
//   3. A 511 x 256 image -- the widest the 9-bit width register holds, and
//      the most pixels the SRAM holds at two words per pixel -- is loaded,
//      which needs the high address register, and a whole frame is checked.
// Frames are compared slot by slot with a screen computed here. The PLL
// output, the fixed seven-segment pattern and the SRAM tie-offs are checked
// too. Each mechanism is counted and must have happened at least once: bus
// stalls (waitrequest), pixel fetches lost to writes, background captures,
// frames shown in loading mode, writes needing address bits 17:16, frame
// address wrap-arounds and SD command/response exchanges.
module tb_imagic_top;
  import imagic_pkg::*;

  localparam int FRAME = 800 * 525;

  logic clk = 0, rst_n = 0;
  logic [7:0] avm_address = 0;
  logic avm_read = 0, avm_write = 0, avm_waitrequest;
  logic [31:0] avm_writedata = 0, avm_readdata;
  logic sd_clk, sd_cmd, sd_dat, sd_dat3;
  logic [SRAM_ADDR_W-1:0] sram_addr;
  logic [SRAM_DATA_W-1:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_ub_n, sram_lb_n;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  logic dram_clk;
  logic [7:0][6:0] hex_n;
  int checks = 0, failures = 0;

  imagic_top dut (.clk_50(clk), .*);

  sram_model u_mem (.addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i), .we_n(sram_we_n));
  spi_card_model card (.sclk(sd_clk), .cs_n(sd_dat3), .mosi(sd_cmd), .miso(sd_dat));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int n_stall = 0, n_skip = 0, n_bg = 0, n_loading_frames = 0, n_hi_addr = 0;
  int n_wrap = 0, n_sd_cmds = 0;

  // Every SRAM write cycle takes the SRAM away from one pixel fetch; every
  // vertical sync pulse follows a frame end, where the read address wraps.
  logic vs_q = 1;
  always @(posedge clk) if (rst_n) begin
    if (!sram_we_n && vga_clk) n_skip++;
    vs_q <= vga_vs_n;
    if (vs_q && !vga_vs_n) n_wrap++;
  end

  // ------------------------------------------------------------ CPU master
  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    avm_address = a; avm_write = 1; avm_writedata = d;
    #1;
    if (avm_waitrequest) n_stall++;
    while (avm_waitrequest) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    avm_write = 0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    avm_address = a; avm_read = 1;
    #1;
    while (avm_waitrequest) begin @(negedge clk); #1; end
    d = avm_readdata;
    @(posedge clk); #1;
    avm_read = 0;
  endtask

  // --------------------------------------------------------- SD card, SPI
  localparam logic [7:0] A_CLK = 8'h20, A_CMD = 8'h40, A_DAT = 8'h60, A_NCS = 8'h80;

  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      bus_write(A_CMD, 32'(b[i]));
      bus_write(A_CLK, 1);
      bus_write(A_CLK, 0);
    end
  endtask

  task automatic recv_byte(output logic [7:0] b);
    logic [31:0] d;
    for (int i = 7; i >= 0; i--) begin
      bus_write(A_CLK, 1);
      bus_read(A_DAT, d);
      b[i] = d[0];
      bus_write(A_CLK, 0);
    end
  endtask

  task automatic sd_command(input logic [47:0] frame, output logic [7:0] r1);
    for (int i = 5; i >= 0; i--) send_byte(frame[i*8 +: 8]);
    r1 = 8'hff;
    for (int i = 0; i < 8 && r1 == 8'hff; i++) recv_byte(r1);
    check(card.last_cmd == frame, "card received the command");
    if (r1 != 8'hff) n_sd_cmds++;
    send_byte(8'hff);
  endtask

  // ------------------------------------------------------------ VGA frames
  int          img_w = 1, img_h = 1;
  logic [15:0] img [];
  logic [15:0] bg_px = 0;
  int          m = 0, last_wr = 0, checked_frames = 0;

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
      check(vga_hs_n == !(h < 96) && vga_vs_n == !(v < 2) &&
            vga_blank_n == !(h < 96 || v < 2) && vga_sync_n == 0, "sync and blank");
      if (in_img && img_w != 1) px = img[(v - y0) * img_w + (h - x0)];
      else                      px = bg_px;
      if (vis || in_img)
        check(vga_r == wide(px[14:10]) && vga_g == wide(px[9:5]) && vga_b == wide(px[4:0]),
              "pixel colour");
      else
        check(vga_r == 0 && vga_g == 0 && vga_b == 0, "black outside the screen");
      if (j % FRAME == FRAME - 1) begin
        checked_frames++;
        if (img_w == 1) n_loading_frames++;
      end
    end
  end

  task automatic wait_frames(input int n);
    int target;
    target = checked_frames + n;
    wait (checked_frames >= target);
  endtask

  task automatic vga_write(input logic [4:0] r, input logic [31:0] d);
    bus_write({3'd0, r}, d);
    last_wr = m;
  endtask

  task automatic load_image(input int w, input int h, input int seed, input bit check_loading);
    logic [15:0] px [];
    px = new[w * h];
    for (int i = 0; i < w * h; i++) px[i] = 16'((i * 37 + seed * 1001) ^ (i << 7)) & 16'h7fff;
    vga_write(REG_WIDTH, 1);
    vga_write(REG_HEIGHT, 1);
    for (int i = 0; i < w * h; i++) begin
      if ((2 * i) >> 16 != 0) n_hi_addr++;
      vga_write(REG_ADDR_LO, 32'((2 * i) & 'hffff));
      vga_write(REG_ADDR_HI, 32'((2 * i) >> 16));
      vga_write(REG_PIXEL, 32'(px[i]));
      if (i == 0) begin
        n_bg++;
        img_w = 1; img_h = 1; bg_px = px[0];
        // the loading-mode frame shows px[0] everywhere: the captured background
        if (check_loading) wait_frames(1);
      end
    end
    vga_write(REG_WIDTH, 32'(w));
    vga_write(REG_HEIGHT, 32'(h));
    img = px; img_w = w; img_h = h;
    wait_frames(1);
  endtask

  // ------------------------------------------------------------- PLL check
  realtime t_dram_rise = 0;
  int n_pll = 0;
  always @(posedge dram_clk) t_dram_rise = $realtime;
  always @(posedge clk) if ($realtime > 1000) begin
    check($realtime - t_dram_rise > 2.999 && $realtime - t_dram_rise < 3.001,
          "SDRAM clock leads by 3 ns");
    n_pll++;
  end

  // --------------------------------------------------------------- program
  initial begin
    logic [7:0] r1;
    int tries;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(hex_n[7] == 7'b0001001 && hex_n[3] == 7'b1000000 && hex_n[0] == 7'b1111111,
          "seven-segment text");
    check(sram_oe_n == 0 && sram_ce_n == 0 && sram_ub_n == 0 && sram_lb_n == 0, "SRAM tie-offs");

    // SD card bring-up
    bus_write(A_NCS, 1);
    bus_write(A_CMD, 1);
    repeat (80) begin bus_write(A_CLK, 1); bus_write(A_CLK, 0); end
    bus_write(A_NCS, 0);
    sd_command(48'h40_00000000_95, r1);
    check(r1 == 8'h01, "CMD0 -> idle");
    tries = 0;
    do begin sd_command(48'h41_00000000_ff, r1); tries++; end
    while (r1 != 8'h00 && tries < 5);
    check(r1 == 8'h00, "CMD1 -> ready");
    sd_command(48'h50_00000200_ff, r1);
    check(r1 == 8'h00, "CMD16 accepted");

    // images
    load_image(40, 30, 1, 1'b1);
    load_image(511, 256, 2, 1'b0);

    $display("stalls=%0d skipped_fetches=%0d bg_captures=%0d loading_frames=%0d",
             n_stall, n_skip, n_bg, n_loading_frames);
    $display("hi_addr_writes=%0d frame_wraps=%0d sd_cmds=%0d pll_checks=%0d frames=%0d",
             n_hi_addr, n_wrap, n_sd_cmds, n_pll, checked_frames);
    check(n_stall > 0, "bus stall happened");
    check(n_skip > 0, "fetch lost to a write happened");
    check(n_bg >= 2, "background captured for each image");
    check(n_loading_frames > 0, "loading-mode frame shown");
    check(n_hi_addr > 0, "high address register used");
    check(n_wrap > 0, "read address wrapped at end of frame");
    check(n_sd_cmds >= 4, "SD command/response exchanges");
    check(checked_frames >= 3, "frames compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
