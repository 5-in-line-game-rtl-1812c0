// pixel_color_gen: board state registers and pixel colour of the
// 5-in-line display.
//
// Instead of a frame buffer, the module keeps only what the picture is made
// of: two bits per grid for the 15 x 15 board (450 flip-flops) and the
// cursor position.  Every pixel colour is computed on the fly from
// hcount/vcount and that state.
//
// Instruction words (layout in fiveline_pkg) arrive from the processor over
// the slave side of an FSL link.  Whenever fsl_exists is high the word on
// fsl_din is taken in that same clock and fsl_rd_ack is raised to pop it, so
// one word is applied per clock.  The state section selects:
//   000/001/010  grid (X,Y) becomes empty/green/blue and the cursor moves to
//                (X,Y).  A plain cursor move is sent with the grid's present
//                state, which leaves the grid as it was.
//   011          grid (X,Y) becomes "winning" (red); the cursor stays.
//   100          every grid becomes empty in one clock; the cursor stays.
//   101..111     ignored.
// A word whose X or Y is 15 changes nothing (it is still popped).  Reset
// empties the board and puts the cursor on the centre grid (7,7).
//
// Drawing: the 450x450 board sits at (BOARD_X0, BOARD_Y0).  Each 30x30 grid
// has a frame two pixels wide, a round piece area of radius PIECE_R in the
// middle and a cursor bar under it; the rest is blank background.  The
// colour is registered, so it belongs to the hcount/vcount of the previous
// clock (as do the sync outputs of vga_sync).
//
// From the report: the FSL ports of this block, the 15 x 15 grid of 30x30
// pixels, two bits per grid, the word layout, the green, win and clear
// codes, the two-pixel frame and the piece/cursor split of a grid.  This
// design's choices: the blue and empty codes, the board position, the
// colours of frame, background and cursor, the piece radius and cursor bar
// size, handling of invalid words, and the reset state.  The report gives no
// use for the master side of the FSL link (fsl_full, fsl_wr_en, fsl_dout);
// the ports exist to fit the link, and this block never writes to it.
module pixel_color_gen
  import fiveline_pkg::*;
#(
  parameter int unsigned BOARD_X0     = 95,  // (640 - 450) / 2
  parameter int unsigned BOARD_Y0     = 15,  // (480 - 450) / 2
  parameter int unsigned PIECE_R      = 11,  // piece radius in pixels
  parameter rgb8_t       OUTSIDE_RGB  = RGB_BLACK,
  parameter rgb8_t       FRAME_RGB    = RGB_BLACK,
  parameter rgb8_t       BACK_RGB     = RGB_WHITE,
  parameter rgb8_t       CURSOR_RGB   = RGB_RED,
  parameter rgb8_t       HUMAN_RGB    = RGB_GREEN,
  parameter rgb8_t       MACH_RGB     = RGB_BLUE,
  parameter rgb8_t       WIN_RGB      = RGB_RED
) (
  input  logic        clk,
  input  logic        rst,         // synchronous, active high
  // timing from vga_sync
  input  logic        blank,
  input  logic [9:0]  hcount,
  input  logic [9:0]  vcount,
  // FSL slave side: instruction words from the processor
  input  logic        fsl_exists,
  input  logic [31:0] fsl_din,
  output logic        fsl_rd_ack,
  // FSL master side: unused by this design
  input  logic        fsl_full,
  output logic        fsl_wr_en,
  output logic [31:0] fsl_dout,
  // pixel colour, RRRGGGBB
  output rgb8_t       color
);

  // Cursor bar inside a grid, local pixel coordinates
  localparam int unsigned CUR_U0 = 4;
  localparam int unsigned CUR_U1 = 25;
  localparam int unsigned CUR_V0 = 26;
  localparam int unsigned CUR_V1 = 27;
  localparam int unsigned FRAME  = 2;

  // ------------------------------------------------------------------
  // Board state
  // ------------------------------------------------------------------
  cell_e      grid [BOARD_N][BOARD_N];  // [x][y]
  logic [3:0] cur_x, cur_y;

  instr_t     word;
  state_cmd_e cmd;
  logic       in_range;

  assign word       = instr_t'(fsl_din);
  assign cmd        = state_cmd_e'(word.state);
  assign in_range   = (word.x < 4'(BOARD_N)) && (word.y < 4'(BOARD_N));
  assign fsl_rd_ack = fsl_exists;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < BOARD_N; i++)
        for (int j = 0; j < BOARD_N; j++)
          grid[i][j] <= CELL_EMPTY;
      cur_x <= 4'(BOARD_N / 2);
      cur_y <= 4'(BOARD_N / 2);
    end else if (fsl_exists) begin
      case (cmd)
        CMD_EMPTY, CMD_HUMAN, CMD_MACH: begin
          if (in_range) begin
            grid[word.x][word.y] <= cell_e'(word.state[1:0]);
            cur_x <= word.x;
            cur_y <= word.y;
          end
        end
        CMD_WIN: begin
          if (in_range) grid[word.x][word.y] <= CELL_WIN;
        end
        CMD_CLEAR: begin
          for (int i = 0; i < BOARD_N; i++)
            for (int j = 0; j < BOARD_N; j++)
              grid[i][j] <= CELL_EMPTY;
        end
        default: ;
      endcase
    end
  end

  // Master side of the link is not used
  assign fsl_wr_en = 1'b0;
  assign fsl_dout  = '0;

  // ------------------------------------------------------------------
  // Pixel colour
  // ------------------------------------------------------------------
  // Quotient of a board-relative coordinate by the grid size, by comparing
  // with every grid boundary (no divider needed).
  function automatic logic [3:0] cell_of(input logic [9:0] rel);
    logic [3:0] q;
    q = '0;
    for (int k = 1; k < BOARD_N; k++)
      if (rel >= 10'(k * CELL_PX)) q = 4'(k);
    return q;
  endfunction

  logic        in_board;
  logic [9:0]  rel_x, rel_y;
  logic [3:0]  col, row;
  logic [4:0]  u, v;            // pixel position inside its grid, 0..29
  logic signed [6:0] du, dv;    // 2u-29, 2v-29: distance from grid centre x2
  logic        on_frame, on_piece, on_cursor;
  cell_e       pix_cell;
  rgb8_t       pix;

  assign in_board = (hcount >= 10'(BOARD_X0)) && (hcount < 10'(BOARD_X0 + BOARD_PX)) &&
                    (vcount >= 10'(BOARD_Y0)) && (vcount < 10'(BOARD_Y0 + BOARD_PX));
  assign rel_x = hcount - 10'(BOARD_X0);
  assign rel_y = vcount - 10'(BOARD_Y0);

  always_comb begin
    col = cell_of(rel_x);
    row = cell_of(rel_y);
    u   = 5'(rel_x - 10'(col) * 10'(CELL_PX));
    v   = 5'(rel_y - 10'(row) * 10'(CELL_PX));
    du  = 7'(2 * int'(u) - (CELL_PX - 1));
    dv  = 7'(2 * int'(v) - (CELL_PX - 1));
    pix_cell = in_board ? grid[col][row] : CELL_EMPTY;

    on_frame  = (u < 5'(FRAME)) || (u >= 5'(CELL_PX - FRAME)) ||
                (v < 5'(FRAME)) || (v >= 5'(CELL_PX - FRAME));
    on_piece  = (int'(du) * int'(du) + int'(dv) * int'(dv)) <= int'(4 * PIECE_R * PIECE_R);
    on_cursor = (col == cur_x) && (row == cur_y) &&
                (u >= 5'(CUR_U0)) && (u <= 5'(CUR_U1)) &&
                (v >= 5'(CUR_V0)) && (v <= 5'(CUR_V1));

    if (!in_board)       pix = OUTSIDE_RGB;
    else if (on_frame)   pix = FRAME_RGB;
    else if (on_cursor)  pix = CURSOR_RGB;
    else if (on_piece && pix_cell != CELL_EMPTY) begin
      case (pix_cell)
        CELL_HUMAN: pix = HUMAN_RGB;
        CELL_MACH:  pix = MACH_RGB;
        default:    pix = WIN_RGB;
      endcase
    end
    else                 pix = BACK_RGB;
  end

  always_ff @(posedge clk) begin
    if (rst) color <= RGB_BLACK;
    else     color <= blank ? RGB_BLACK : pix;
  end

  // A word is popped only when one is there
  a_rd_ack_needs_exists: assert property (@(posedge clk) disable iff (rst)
    fsl_rd_ack |-> fsl_exists);

endmodule
