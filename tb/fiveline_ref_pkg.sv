// fiveline_ref_pkg: reference model of the board picture, written apart
// from the RTL for the testbenches.
//
// expected_rgb() says which colour pixel (h, v) of a 640x480 screen must
// have for a given board and cursor, using plain division and a circle
// test: board at (95, 15), 30x30 grids, frame of 2 pixels (black),
// piece disc of radius 11 around the grid centre (14.5, 14.5), cursor bar
// at grid rows 26..27, columns 4..25 (red), blank background white, black
// outside the board and during blanking.
package fiveline_ref_pkg;

  typedef logic [224:0][1:0] board_t;  // index x*15 + y

  function automatic logic [7:0] expected_rgb(input board_t b, input int cx, input int cy,
                                              input int h, input int v);
    int x, y, gx, gy, u, w, d2;
    logic [1:0] s;
    if (h >= 640 || v >= 480) return 8'h00;
    x = h - 95;
    y = v - 15;
    if (x < 0 || y < 0 || x >= 450 || y >= 450) return 8'h00;
    gx = x / 30;  u = x % 30;
    gy = y / 30;  w = y % 30;
    if (u < 2 || u > 27 || w < 2 || w > 27) return 8'h00;
    if (gx == cx && gy == cy && u >= 4 && u <= 25 && w >= 26 && w <= 27) return 8'hE0;
    s  = b[gx*15 + gy];
    d2 = (2*u - 29) * (2*u - 29) + (2*w - 29) * (2*w - 29);
    if (s != 2'b00 && d2 <= 484) begin
      case (s)
        2'b01:   return 8'h1C;  // green
        2'b10:   return 8'h03;  // blue
        default: return 8'hE0;  // red, winning line
      endcase
    end
    return 8'hFF;
  endfunction

endpackage
