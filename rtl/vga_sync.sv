// vga_sync: horizontal and vertical timing for a 640x480, 60 Hz VGA screen.
//
// Two counters run on the 25 MHz pixel clock.  hcount counts pixels within
// a line (0..H_TOTAL-1) and vcount counts lines within a frame
// (0..V_TOTAL-1).  Both start at the first visible pixel, so the visible
// area is hcount < H_DISP and vcount < V_DISP; after it come the front
// porch, the sync pulse and the back porch.  blank is high outside the
// visible area, where no pixel colour may be driven.
//
// Timing: hcount, vcount and blank belong to the same pixel and change on
// each rising clock edge.  hs_n and vs_n (active low) are registered from
// the counters and so appear one clock after the hcount/vcount they belong
// to; the pixel colour generator registers its colour the same way, so at
// the pins sync and colour line up.
//
// The report names this module, its outputs (HS, VS, blank, hcount,
// vcount) and its job; the porch and pulse lengths are the usual numbers
// for this mode on the Nexys-2 board (800 clocks per line, 521 lines per
// frame), and the active-low sync, the synchronous active-high reset and
// the one-clock sync delay are this design's choices.
module vga_sync #(
  parameter int unsigned H_DISP = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_PW   = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_DISP = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_PW   = 2,
  parameter int unsigned V_BP   = 29
) (
  input  logic       clk,     // pixel clock, 25 MHz
  input  logic       rst,     // synchronous, active high
  output logic       hs_n,    // horizontal sync, active low
  output logic       vs_n,    // vertical sync, active low
  output logic       blank,   // 1 outside the visible area
  output logic [9:0] hcount,  // pixel column of the current clock
  output logic [9:0] vcount   // line of the current clock
);

  localparam int unsigned H_TOTAL = H_DISP + H_FP + H_PW + H_BP;
  localparam int unsigned V_TOTAL = V_DISP + V_FP + V_PW + V_BP;
  localparam int unsigned H_SYNC0 = H_DISP + H_FP;
  localparam int unsigned V_SYNC0 = V_DISP + V_FP;

  logic h_last, v_last;

  assign h_last = (hcount == 10'(H_TOTAL - 1));
  assign v_last = (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else begin
      if (h_last) begin
        hcount <= '0;
        vcount <= v_last ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 10'd1;
      end
    end
  end

  assign blank = (hcount >= 10'(H_DISP)) || (vcount >= 10'(V_DISP));

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_n <= 1'b1;
      vs_n <= 1'b1;
    end else begin
      hs_n <= !((hcount >= 10'(H_SYNC0)) && (hcount < 10'(H_SYNC0 + H_PW)));
      vs_n <= !((vcount >= 10'(V_SYNC0)) && (vcount < 10'(V_SYNC0 + V_PW)));
    end
  end

endmodule
