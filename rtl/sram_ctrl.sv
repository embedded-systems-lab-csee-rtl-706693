// sram_ctrl: shares one asynchronous 256K x 16 SRAM between the video scan-out
// and the CPU, and holds the VGA peripheral's registers.
//
// The SRAM is the frame store. The display must fetch one pixel every 40 ns
// (25 MHz), and the bus clock is 50 MHz, so every pixel period is split into
// two bus cycles selected by the phase input `ph`:
//
//   read half  (edge with ph = 1): WE_n is raised (this completes any write
//              started in the write half), the read address is put on the
//              SRAM, and the data that the previous read address produced is
//              latched as the current pixel -- unless the bus was lent to a
//              write in between, in which case the previous pixel is kept
//              (one repeated pixel is invisible).
//   write half (edge with ph = 0): a pending Avalon write is accepted. A write
//              to REG_PIXEL drives the write address and data onto the SRAM and
//              pulls WE_n low; writes to the other registers only load them.
//
// Avalon timing: waitrequest is high throughout the cycle that ends on a
// read-half edge, so a write can only complete on a write-half edge. A
// master therefore waits at most one cycle per transfer. There are no
// readable registers; readdata is 0.
//
// Register map (word offsets): 0 pixel (15-bit RGB 5-5-5), 1 write address
// bits 15:0, 2 write address bits 17:16, 3 width, 4 height. Writing width = 1
// announces a new image: the display shows only the background colour while
// width is 1, and the next pixel written becomes the new background colour.
// Writing the real width and height afterwards shows the image.
//
// The register map, the two-half sharing of the SRAM, the repeated pixel
// after a write, the width = 1 convention, the background capture and the
// UB/LB/CE/OE tie-offs follow the document. This design's own choices: the
// read data is latched on the rising bus-clock edge that starts the next read
// half (the document uses a falling edge), waitrequest is decoded from the
// phase, the reset is asynchronous and active low, and the bidirectional data
// bus is split into dq_o/dq_oe/dq_i for the pad.
module sram_ctrl
  import imagic_pkg::*;
(
  input  logic                   clk,       // 50 MHz bus clock
  input  logic                   rst_n,
  input  logic                   ph,        // 1: this cycle ends on a read-half edge
  input  logic [SRAM_ADDR_W-1:0] rd_addr,   // address of the pixel to fetch
  // Avalon-MM slave
  input  avs_req_t               avs_req,
  output avs_rsp_t               avs_rsp,
  // Registers seen by the display
  output rgb555_t                pixel,     // last pixel fetched from SRAM
  output rgb555_t                bg,        // background colour
  output logic [DIM_W-1:0]       width,
  output logic [DIM_W-1:0]       height,
  output logic                   read_skipped, // pulse: a fetch was lost to a write
  // SRAM pins
  output logic [SRAM_ADDR_W-1:0] sram_addr,
  output logic [SRAM_DATA_W-1:0] sram_dq_o,
  output logic                   sram_dq_oe,
  input  logic [SRAM_DATA_W-1:0] sram_dq_i,
  output logic                   sram_we_n,
  output logic                   sram_oe_n,
  output logic                   sram_ce_n,
  output logic                   sram_ub_n,
  output logic                   sram_lb_n
);

  logic [SRAM_ADDR_W-1:0] wr_addr;
  logic                   write_data;        // SRAM was lent to a write
  logic                   write_background;  // next pixel sets the background
  logic                   bus_write;

  // Always enabled, always a full word, outputs enabled whenever WE_n is high.
  assign sram_oe_n = 1'b0;
  assign sram_ce_n = 1'b0;
  assign sram_ub_n = 1'b0;
  assign sram_lb_n = 1'b0;

  assign avs_rsp.readdata    = '0;
  assign avs_rsp.waitrequest = ph;

  assign bus_write = avs_req.chipselect && avs_req.write && !ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr        <= '0;
      sram_dq_o        <= '0;
      sram_dq_oe       <= 1'b0;
      sram_we_n        <= 1'b1;
      wr_addr          <= '0;
      write_data       <= 1'b0;
      write_background <= 1'b0;
      pixel            <= '0;
      bg               <= '0;
      width            <= DIM_W'(1);
      height           <= DIM_W'(1);
      read_skipped     <= 1'b0;
    end else if (ph) begin
      // read half
      sram_we_n    <= 1'b1;
      sram_dq_oe   <= 1'b0;
      sram_addr    <= rd_addr;
      write_data   <= 1'b0;
      read_skipped <= write_data;
      if (!write_data) pixel <= rgb555_t'(sram_dq_i);
    end else begin
      // write half
      read_skipped <= 1'b0;
      if (bus_write) begin
        unique case (avs_req.address)
          REG_PIXEL: begin
            sram_addr  <= wr_addr;
            sram_dq_o  <= avs_req.writedata[SRAM_DATA_W-1:0];
            sram_dq_oe <= 1'b1;
            sram_we_n  <= 1'b0;
            write_data <= 1'b1;
            if (write_background) begin
              write_background <= 1'b0;
              bg <= rgb555_t'(avs_req.writedata[SRAM_DATA_W-1:0]);
            end
          end
          REG_ADDR_LO: wr_addr[15:0]  <= avs_req.writedata[15:0];
          REG_ADDR_HI: wr_addr[17:16] <= avs_req.writedata[1:0];
          REG_WIDTH: begin
            width <= avs_req.writedata[DIM_W-1:0];
            if (avs_req.writedata[DIM_W-1:0] == DIM_W'(1)) write_background <= 1'b1;
          end
          REG_HEIGHT: height <= avs_req.writedata[DIM_W-1:0];
          default: ;
        endcase
      end
    end
  end

  // The controller drives the data bus only while WE_n is low.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!sram_dq_oe || !sram_we_n)
      else $error("sram_ctrl: data bus driven outside a write");
  end

endmodule
