// tb_pixel_color_gen: drives pixel_color_gen with hand-picked pixel
// positions and FSL instruction words, and compares each registered colour
// with fiveline_ref_pkg::expected_rgb() evaluated on a board model kept by
// the testbench.
//
// Covered: reset state (empty board, cursor at the centre grid), the
// report's example word 0x177 (green piece at column 7, row 7), blue
// pieces and cursor moves, winning marks (cursor stays), words with X or Y
// = 15 and unknown codes (ignored), the clear code (whole board empty in
// one word), blanking, and a random game of 300 words checked over every
// grid.  The pop strobe fsl_rd_ack must follow fsl_exists in the same clock.
module tb_pixel_color_gen;
  import fiveline_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        blank = 1'b0;
  logic [9:0]  hcount = '0, vcount = '0;
  logic        fsl_exists = 1'b0;
  logic [31:0] fsl_din = '0;
  logic        fsl_rd_ack;
  logic        fsl_full = 1'b0;
  logic        fsl_wr_en;
  logic [31:0] fsl_dout;
  logic [7:0]  color;

  int checks = 0, failures = 0;
  board_t b;
  int cx, cy;

  pixel_color_gen dut (.*);

  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // Send one FSL word, update the model the way the word must act
  task automatic send(input logic [2:0] st, input int x, input int y);
    @(negedge clk);
    fsl_exists = 1'b1;
    fsl_din    = {21'h15A5A, st, 4'(x), 4'(y)};  // junk in unused bits
    #1 check(fsl_rd_ack == 1'b1, "rd_ack with exists");
    @(negedge clk);
    fsl_exists = 1'b0;
    #1 check(fsl_rd_ack == 1'b0, "no rd_ack without exists");
    check(fsl_wr_en == 1'b0, "master side idle");
    if (st == 3'b100) b = '0;
    else if (x < 15 && y < 15) begin
      if (st <= 3'b010) begin b[x*15+y] = st[1:0]; cx = x; cy = y; end
      else if (st == 3'b011) b[x*15+y] = 2'b11;
    end
  endtask

  // Show pixel (h, v), compare the colour one clock later
  task automatic pixel(input int h, input int v);
    logic [7:0] exp_c;
    @(negedge clk);
    hcount = 10'(h);
    vcount = 10'(v);
    blank  = (h >= 640) || (v >= 480);
    exp_c  = expected_rgb(b, cx, cy, h, v);
    @(negedge clk);
    checks++;
    if (color !== exp_c) begin
      failures++;
      if (failures < 20) $display("FAIL pixel (%0d,%0d) got %h exp %h", h, v, color, exp_c);
    end
  endtask

  // Centre of the piece, a frame pixel, a cursor-bar pixel and a
  // background pixel of grid (gx, gy)
  task automatic grid_pixels(input int gx, input int gy);
    int h0, v0;
    h0 = 95 + 30 * gx;
    v0 = 15 + 30 * gy;
    pixel(h0 + 15, v0 + 15);
    pixel(h0 + 1, v0 + 10);
    pixel(h0 + 12, v0 + 26);
    pixel(h0 + 3, v0 + 3);
  endtask

  task automatic all_grids();
    for (int gx = 0; gx < 15; gx++)
      for (int gy = 0; gy < 15; gy++) grid_pixels(gx, gy);
  endtask

  initial begin
    #(40 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = '0; cx = 7; cy = 7;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // reset picture
    all_grids();
    pixel(0, 0); pixel(94, 100); pixel(545, 100); pixel(300, 14); pixel(300, 465);
    pixel(700, 100); pixel(300, 500);

    // the report's example: green piece at the centre, word 0x177
    @(negedge clk);
    fsl_exists = 1'b1; fsl_din = 32'h0000_0177;
    @(negedge clk);
    fsl_exists = 1'b0;
    b[7*15+7] = 2'b01;
    grid_pixels(7, 7);
    check(color == 8'hFF, "background next to the piece");

    // blue piece, cursor follows
    send(3'b010, 8, 7);
    grid_pixels(7, 7); grid_pixels(8, 7);
    // edge of the disc, exact radius
    pixel(95 + 30*8 + 4, 15 + 30*7 + 14);   // (2*4-29)^2+(2*14-29)^2 = 442 inside
    pixel(95 + 30*8 + 3, 15 + 30*7 + 14);   // 677 outside
    pixel(95 + 30*8 + 14, 15 + 30*7 + 25);  // 442 inside
    // corner grids
    send(3'b001, 0, 0); send(3'b010, 14, 14); send(3'b001, 14, 0);
    grid_pixels(0, 0); grid_pixels(14, 14); grid_pixels(14, 0);
    pixel(95 + 449, 15 + 449); pixel(95, 15);
    // win marks keep the cursor at (14,0)
    send(3'b011, 7, 7); send(3'b011, 8, 7);
    grid_pixels(7, 7); grid_pixels(8, 7); grid_pixels(14, 0);
    // ignored words
    send(3'b001, 15, 3); send(3'b010, 3, 15); send(3'b101, 2, 2); send(3'b111, 2, 2);
    send(3'b011, 15, 15);
    all_grids();
    // plain cursor move over an occupied grid: resend its state
    send(3'b010, 14, 14);
    grid_pixels(14, 14); grid_pixels(14, 0);
    // clear
    send(3'b100, 3, 3);
    all_grids();

    // random game
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 2) send(3'b100, 0, 0);
      else if (r < 10) send(3'b011, $urandom_range(0, 14), $urandom_range(0, 14));
      else if (r < 12) send(3'($urandom_range(5, 7)), $urandom_range(0, 15), $urandom_range(0, 15));
      else send(3'($urandom_range(0, 2)), $urandom_range(0, 15), $urandom_range(0, 15));
    end
    all_grids();
    for (int i = 0; i < 3000; i++) pixel($urandom_range(0, 799), $urandom_range(0, 520));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
