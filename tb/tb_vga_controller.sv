// tb_vga_controller: end-to-end test of the display peripheral at its
// default size, with the testbench playing the processor side.
//
// A model of the game software turns key presses (arrows, Enter, Esc) into
// FSL words: cursor moves resend the state of the grid the cursor lands on,
// Enter places a green piece on an empty grid, the machine answers with a
// blue piece from a fixed list, and after every piece the software looks
// for five in a line in the four directions and sends the winning grids
// with the win code.  Game 1 is won by the human and is cleared the way the
// software does it, with 225 "empty" words; game 2 is won by the machine
// and is cleared with the clear code.  Words wait in a FIFO that stands in
// for the FSL link and are pushed at the start of vertical sync, so they
// are all taken before the next visible frame.
//
// A monitor follows the VGA pins only: it locks to the falling edges of
// vs_n (line 490, pixel 0) and hs_n (pixel 656), counts pixels itself and
// compares every visible pixel of every frame with the reference picture
// of the model board, and checks that blanking is black.  Each mechanism
// (green and blue pieces, cursor move, win mark, clear code, empty-word
// clear, ignored word, burst of back-to-back words, checked frame) is
// counted and must happen at least once.
module tb_vga_controller;
  import fiveline_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        fsl_s_exists;
  logic [31:0] fsl_s_data;
  logic        fsl_s_read;
  logic        fsl_m_full = 1'b0;
  logic        fsl_m_write;
  logic [31:0] fsl_m_data;
  logic        hs_n, vs_n;
  logic [2:0]  vga_red, vga_green;
  logic [1:0]  vga_blue;

  vga_controller dut (.*);

  always #20 clk = ~clk;  // 25 MHz pixel clock

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // ---------------- FSL link stand-in ----------------
  logic [31:0] q[$];
  int burst_len, max_burst;
  // The link's outputs are updated just after each clock edge, from the
  // FIFO contents left after that edge's pop.
  initial begin fsl_s_exists = 1'b0; fsl_s_data = 32'h0; end
  always @(posedge clk) begin
    if (fsl_s_read) begin
      void'(q.pop_front());
      burst_len++;
      if (burst_len > max_burst) max_burst = burst_len;
    end else burst_len = 0;
    #1;
    fsl_s_exists = (q.size() != 0);
    fsl_s_data   = (q.size() != 0) ? q[0] : 32'h0;
  end

  // ---------------- software model ----------------
  board_t b;        // what the display must show
  logic [1:0] g [15][15];  // the game, 1 human, 2 machine
  int cx, cy;
  int n_green, n_blue, n_move, n_win, n_clear_code, n_clear_empty, n_ignored, n_frames;

  function automatic void push(input logic [2:0] st, input int x, input int y);
    q.push_back({21'h0, st, 4'(x), 4'(y)});
    if (st == 3'b100) b = '0;
    else if (x < 15 && y < 15) begin
      if (st <= 3'b010) begin b[x*15+y] = st[1:0]; cx = x; cy = y; end
      else if (st == 3'b011) b[x*15+y] = 2'b11;
    end
  endfunction

  function automatic int run(input int x, input int y, input int dx, input int dy, input logic [1:0] p);
    int n = 0;
    x += dx; y += dy;
    while (x >= 0 && x < 15 && y >= 0 && y < 15 && g[x][y] == p) begin
      n++; x += dx; y += dy;
    end
    return n;
  endfunction

  // Five in a line through (x,y)?  Marks the line red on the display.
  function automatic bit judge(input int x, input int y);
    int dirs [4][2] = '{'{1, 0}, '{1, 1}, '{0, 1}, '{1, -1}};
    logic [1:0] p = g[x][y];
    for (int d = 0; d < 4; d++) begin
      int back = run(x, y, -dirs[d][0], -dirs[d][1], p);
      int fwd  = run(x, y, dirs[d][0], dirs[d][1], p);
      if (back + fwd + 1 >= 5) begin
        for (int k = -back; k <= fwd; k++) begin
          push(3'b011, x + k * dirs[d][0], y + k * dirs[d][1]);
          n_win++;
        end
        return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  event frame_start;
  bit   game_over;

  task automatic key(input string k, input int mx = 0, input int my = 0,
                     input int jx = -1, input int jy = -1);
    @(frame_start);
    if (jx >= 0) begin cx = jx; cy = jy; end  // software moves its cursor first
    check(q.size() == 0, "FIFO drained before sync");
    case (k)
      "left", "right", "up", "down": begin
        if (k == "left"  && cx > 0)  cx--;
        if (k == "right" && cx < 14) cx++;
        if (k == "up"    && cy > 0)  cy--;
        if (k == "down"  && cy < 14) cy++;
        push({1'b0, b[cx*15+cy]}, cx, cy);
        n_move++;
      end
      "enter": begin
        if (g[cx][cy] == 2'b00) begin
          int hx = cx, hy = cy;
          g[hx][hy] = 2'b01;
          push(3'b001, hx, hy);
          n_green++;
          if (judge(hx, hy)) game_over = 1'b1;
          else begin
            g[mx][my] = 2'b10;
            push(3'b010, mx, my);
            n_blue++;
            if (judge(mx, my)) game_over = 1'b1;
          end
        end
      end
      "esc_empty": begin  // clear grid by grid, as the game software does
        for (int x = 0; x < 15; x++)
          for (int y = 0; y < 15; y++) begin g[x][y] = 2'b00; push(3'b000, x, y); end
        push(3'b000, 7, 7);
        n_clear_empty++;
        game_over = 1'b0;
      end
      "esc_code": begin
        for (int x = 0; x < 15; x++)
          for (int y = 0; y < 15; y++) g[x][y] = 2'b00;
        push(3'b100, 0, 0);
        push(3'b000, 7, 7);
        n_clear_code++;
        game_over = 1'b0;
      end
      "junk": begin
        push(3'b110, 3, 4);
        push(3'b001, 15, 2);
        n_ignored += 2;
      end
      default: ;
    endcase
  endtask

  // ---------------- monitor on the VGA pins ----------------
  int px, ln;
  bit synced, checking;
  logic hs_q, vs_q;
  initial begin synced = 0; checking = 0; hs_q = 1; vs_q = 1; px = 0; ln = 0; end

  always @(negedge clk) begin
    logic [7:0] c;
    c = {vga_red, vga_green, vga_blue};
    if (synced) begin
      px++;
      if (px == 800) begin px = 0; ln++; if (ln == 521) ln = 0; end
    end
    if (vs_q && !vs_n) begin
      if (synced) check(px == 0 && ln == 490, "vs position");
      px = 0; ln = 490; synced = 1;
      if (checking) n_frames++;
      -> frame_start;
    end
    if (hs_q && !hs_n && synced) check(px == 656, "hs position");
    if (synced && checking) begin
      if (px < 640 && ln < 480) begin
        logic [7:0] e;
        e = expected_rgb(b, cx, cy, px, ln);
        checks++;
        if (c !== e) begin
          failures++;
          if (failures < 20) $display("FAIL pixel (%0d,%0d) got %h exp %h", px, ln, c, e);
        end
      end else if (px == 700 || ln == 500) check(c == 8'h00, "black in blanking");
    end
    hs_q = hs_n; vs_q = vs_n;
  end

  initial begin
    #(40 * 800 * 521 * 80);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = '0; cx = 7; cy = 7; game_over = 0;
    for (int x = 0; x < 15; x++) for (int y = 0; y < 15; y++) g[x][y] = 2'b00;
    n_green = 0; n_blue = 0; n_move = 0; n_win = 0; n_clear_code = 0;
    n_clear_empty = 0; n_ignored = 0; n_frames = 0; burst_len = 0; max_burst = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(frame_start);
    checking = 1;
    check(fsl_m_write == 1'b0, "master side idle");

    // game 1: human builds row 7, columns 5..9; machine plays row 0
    // (the cursor follows the machine's piece, so the software jumps it
    // back to the human's last piece before each arrow key)
    key("enter", 0, 0);                                  // human (7,7)
    key("left", 0, 0, 7, 7);   key("enter", 1, 0);       // human (6,7)
    key("left", 0, 0, 6, 7);   key("up"); key("down");   // (5,7)
    key("enter", 2, 0);
    key("right", 0, 0, 7, 7);  key("enter", 3, 0);       // human (8,7)
    key("junk");
    key("right", 0, 0, 8, 7);  key("enter", 4, 0);       // human (9,7): five
    check(game_over, "human win detected");
    key("up");
    key("esc_empty");
    // game 2: machine builds column 14; human scatters
    key("down", 0, 0, 2, 2);  key("enter", 14, 3);
    key("down", 0, 0, 2, 5);  key("enter", 14, 4);
    key("right", 0, 0, 5, 2); key("enter", 14, 5);
    key("down", 0, 0, 9, 9);  key("enter", 14, 6);
    key("down", 0, 0, 11, 11); key("enter", 14, 7);  // machine wins
    check(game_over, "machine win detected");
    key("esc_code");
    key("right");
    @(frame_start);

    check(n_frames > 20, "frames checked");
    check(n_green > 0, "green piece");
    check(n_blue > 0, "blue piece");
    check(n_move > 0, "cursor move");
    check(n_win == 10, "win marks");
    check(n_clear_code > 0, "clear code");
    check(n_clear_empty > 0, "clear with empty words");
    check(n_ignored > 0, "ignored words");
    check(max_burst >= 225, "back-to-back words");
    $display("frames=%0d green=%0d blue=%0d moves=%0d win=%0d clear_code=%0d clear_empty=%0d ignored=%0d max_burst=%0d",
             n_frames, n_green, n_blue, n_move, n_win, n_clear_code, n_clear_empty, n_ignored, max_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
