// vga_controller: the custom display peripheral of the 5-in-line game.
//
// The processor keeps the game and sends the display only what changes:
// one 32-bit word per placed piece, cursor move, winning grid or board
// clear, over a Fast Simplex Link (FSL, a point-to-point FIFO link).  The
// peripheral holds the 15 x 15 board in registers and redraws it on a
// 640x480, 60 Hz VGA monitor every frame, so no frame buffer and no memory
// accesses are needed.
//
// It is two blocks: vga_sync makes the sync pulses and the pixel position
// (hcount, vcount, blank); pixel_color_gen takes the FSL words, keeps the
// board state and computes each pixel's colour.  clk is the 25 MHz pixel
// clock (the 50 MHz system clock halved outside this block).  FSL words are
// taken one per clock while fsl_s_exists is high.  hs_n, vs_n and the
// colour all appear one clock after the pixel position they belong to.
//
// The split into two blocks, their signals and the FSL connection follow
// the report; the pin-level split of the colour into 3+3+2 bits follows the
// Nexys-2 VGA port it describes.  fsl_m_* is the unused master side of the
// link (see pixel_color_gen).
module vga_controller
  import fiveline_pkg::*;
(
  input  logic        clk,           // 25 MHz pixel clock
  input  logic        rst,           // synchronous, active high
  // FSL slave: words from the processor
  input  logic        fsl_s_exists,
  input  logic [31:0] fsl_s_data,
  output logic        fsl_s_read,
  // FSL master: towards the processor, never written
  input  logic        fsl_m_full,
  output logic        fsl_m_write,
  output logic [31:0] fsl_m_data,
  // VGA port
  output logic        hs_n,
  output logic        vs_n,
  output logic [2:0]  vga_red,
  output logic [2:0]  vga_green,
  output logic [1:0]  vga_blue
);

  logic       blank;
  logic [9:0] hcount, vcount;
  rgb8_t      color;

  vga_sync u_sync (
    .clk    (clk),
    .rst    (rst),
    .hs_n   (hs_n),
    .vs_n   (vs_n),
    .blank  (blank),
    .hcount (hcount),
    .vcount (vcount)
  );

  pixel_color_gen u_pixel (
    .clk        (clk),
    .rst        (rst),
    .blank      (blank),
    .hcount     (hcount),
    .vcount     (vcount),
    .fsl_exists (fsl_s_exists),
    .fsl_din    (fsl_s_data),
    .fsl_rd_ack (fsl_s_read),
    .fsl_full   (fsl_m_full),
    .fsl_wr_en  (fsl_m_write),
    .fsl_dout   (fsl_m_data),
    .color      (color)
  );

  assign {vga_red, vga_green, vga_blue} = color;

endmodule
