// fiveline_pkg: types and constants shared by the VGA display of the
// 5-in-line (gomoku) board.
//
// The processor talks to the display with one 32-bit word per update:
//   bits [3:0]   Y  - row of the grid, 0..14
//   bits [7:4]   X  - column of the grid, 0..14
//   bits [10:8]  state section (command), see state_cmd_e
//   bits [31:11] unused, ignored
// so the word value is state*256 + 16*X + Y.  This layout, the green code
// 001, the win code 011 and the clear code 100 follow the report; the blue
// code 010 and the meaning of 000 (empty) are this design's choice.
//
// Each grid keeps two bits of state (cell_e).  15 x 15 x 2 = 450 bits hold
// the whole board.
package fiveline_pkg;

  // Board geometry
  localparam int unsigned BOARD_N  = 15;  // rows and columns
  localparam int unsigned CELL_PX  = 30;  // pixels per grid side
  localparam int unsigned BOARD_PX = BOARD_N * CELL_PX;  // 450

  // 8-bit VGA colour, Nexys-2 layout: RRR GGG BB
  typedef logic [7:0] rgb8_t;

  localparam rgb8_t RGB_BLACK  = 8'b000_000_00;
  localparam rgb8_t RGB_WHITE  = 8'b111_111_11;
  localparam rgb8_t RGB_GREEN  = 8'b000_111_00;
  localparam rgb8_t RGB_BLUE   = 8'b000_000_11;
  localparam rgb8_t RGB_RED    = 8'b111_000_00;

  // Two-bit state of one grid
  typedef enum logic [1:0] {
    CELL_EMPTY = 2'b00,
    CELL_HUMAN = 2'b01,  // green piece
    CELL_MACH  = 2'b10,  // blue piece
    CELL_WIN   = 2'b11   // piece of the winning line, red
  } cell_e;

  // State section of an instruction word
  typedef enum logic [2:0] {
    CMD_EMPTY = 3'b000,  // write empty grid, move cursor
    CMD_HUMAN = 3'b001,  // write green piece, move cursor
    CMD_MACH  = 3'b010,  // write blue piece, move cursor
    CMD_WIN   = 3'b011,  // mark grid as part of the winning line
    CMD_CLEAR = 3'b100   // clear the whole board
  } state_cmd_e;

  typedef struct packed {
    logic [20:0] unused;
    logic [2:0]  state;
    logic [3:0]  x;
    logic [3:0]  y;
  } instr_t;

endpackage
