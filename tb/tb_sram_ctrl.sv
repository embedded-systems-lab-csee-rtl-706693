// tb_sram_ctrl: checks the SRAM sharing controller against an SRAM model.
//
// A monitor predicts every read half independently: the pixel latched at a
// read edge must be the SRAM word at the address issued one pixel period
// earlier, unless a pixel write used the SRAM in between, in which case the
// previous pixel must be kept and read_skipped must pulse. Meanwhile an
// Avalon master writes the registers: pixels land at the programmed 18-bit
// address (high bits included), width/height are stored, width = 1 makes the
// next pixel the background colour (and only that one), waitrequest is high
// exactly in the cycles prev_pix a read edge, and no write waits more than one
// cycle.
module tb_sram_ctrl;
  import imagic_pkg::*;

  logic clk = 0, rst_n = 0, ph = 0;
  logic [SRAM_ADDR_W-1:0] rd_addr = 0;
  avs_req_t avs_req = '0;
  avs_rsp_t avs_rsp;
  rgb555_t pixel, bg;
  logic [DIM_W-1:0] width, height;
  logic read_skipped;
  logic [SRAM_ADDR_W-1:0] sram_addr;
  logic [SRAM_DATA_W-1:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_ub_n, sram_lb_n;
  int checks = 0, failures = 0, stalls = 0, skips = 0, reads = 0;

  sram_ctrl dut (.clk, .rst_n, .ph, .rd_addr, .avs_req, .avs_rsp, .pixel, .bg,
                 .width, .height, .read_skipped, .sram_addr, .sram_dq_o,
                 .sram_dq_oe, .sram_dq_i, .sram_we_n, .sram_oe_n, .sram_ce_n,
                 .sram_ub_n, .sram_lb_n);

  sram_model u_mem (.addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i), .we_n(sram_we_n));

  always #10 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read-path monitor.
  logic [SRAM_ADDR_W-1:0] issued = 0;
  bit wrote = 0;
  always @(negedge clk) if (rst_n) begin
    check(avs_rsp.waitrequest == ph, "waitrequest follows the phase");
    check(sram_oe_n == 0 && sram_ce_n == 0 && sram_ub_n == 0 && sram_lb_n == 0, "tie-offs");
    if (ph) begin : read_edge
      logic [15:0] pred;
      rgb555_t prev_pix;
      bit keep;
      logic [SRAM_ADDR_W-1:0] next_addr;
      keep = wrote;
      pred = u_mem.mem[issued];
      prev_pix = pixel;
      next_addr = rd_addr;
      @(posedge clk); #1;
      reads++;
      if (keep) begin
        check(pixel == prev_pix, "pixel kept after a write");
        check(read_skipped, "read_skipped pulse");
        skips++;
      end else begin
        check(pixel == rgb555_t'(pred), "pixel fetched");
        check(!read_skipped, "no read_skipped");
      end
      check(sram_addr == next_addr && sram_we_n, "read address issued");
      issued = next_addr;
      wrote = 0;
    end else begin : write_edge
      bit w;
      w = avs_req.chipselect && avs_req.write && avs_req.address == REG_PIXEL;
      @(posedge clk);
      if (w) wrote = 1;
    end
  end

  task automatic avs_write(input logic [4:0] a, input logic [31:0] d);
    int waited = 0;
    @(negedge clk);
    avs_req.chipselect = 1; avs_req.write = 1; avs_req.address = a; avs_req.writedata = d;
    #1;
    while (avs_rsp.waitrequest) begin
      @(negedge clk); #1;
      waited++;
    end
    if (waited > 0) stalls++;
    check(waited <= 1, "at most one wait cycle");
    @(posedge clk); #1;
    avs_req = '0;
  endtask

  task automatic write_pixel(input logic [17:0] a, input logic [15:0] d);
    avs_write(REG_ADDR_LO, 32'(a[15:0]));
    avs_write(REG_ADDR_HI, 32'(a[17:16]));
    avs_write(REG_PIXEL, 32'(d));
    repeat (2) @(posedge clk);
    #1 check(u_mem.mem[a] == d, "pixel written to SRAM");
  endtask

  initial begin
    logic [17:0] a;
    logic [15:0] d;
    repeat (3) @(posedge clk);
    #1 check(width == 1 && height == 1, "reset size is 1 x 1");
    rst_n = 1;
    // free-running reads with random addresses
    fork
      begin
        repeat (400) begin
          @(negedge clk);
          rd_addr = SRAM_ADDR_W'($urandom);
        end
      end
    join_none
    // start a new image: width 1, then pixels
    avs_write(REG_WIDTH, 1);
    avs_write(REG_HEIGHT, 1);
    write_pixel(18'h00000, 16'h7c1f);
    check(bg == rgb555_t'(16'h7c1f), "first pixel becomes background");
    write_pixel(18'h00002, 16'h03e0);
    check(bg == rgb555_t'(16'h7c1f), "later pixel leaves background alone");
    for (int i = 0; i < 40; i++) begin
      a = 18'($urandom); d = 16'($urandom);
      write_pixel(a, d);
    end
    write_pixel(18'h3fffe, 16'h1234);
    avs_write(REG_WIDTH, 123);
    avs_write(REG_HEIGHT, 77);
    #1 check(width == 123 && height == 77, "width and height stored");
    write_pixel(18'h00010, 16'h0001);
    check(bg == rgb555_t'(16'h7c1f), "background held while width is not 1");
    avs_write(REG_WIDTH, 1);
    write_pixel(18'h00012, 16'h2345);
    check(bg == rgb555_t'(16'h2345), "new image sets a new background");
    repeat (600) @(posedge clk);
    check(stalls > 0, "waitrequest stalled the master");
    check(skips > 0, "reads were skipped after writes");
    check(reads > 300, "reads happened");
    $display("stalls=%0d skipped reads=%0d reads=%0d", stalls, skips, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
