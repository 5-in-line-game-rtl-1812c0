// tb_vga_sync: checks the 640x480 60 Hz timing of vga_sync over two full
// frames at the default parameters.  Expected hcount/vcount come from a
// free-running cycle count (n mod 800, n / 800 mod 521); blank, hs_n and
// vs_n are checked against them every clock, and the line period (800
// clocks), the frame period (416,800 clocks, 59.98 Hz at 25 MHz), the
// HS pulse (96 clocks) and the VS pulse (2 lines) are measured from edges.
module tb_vga_sync;
  logic clk = 1'b0, rst = 1'b1;
  logic hs_n, vs_n, blank;
  logic [9:0] hcount, vcount;
  int checks = 0, failures = 0;

  localparam int HT = 800, VT = 521;

  vga_sync dut (.*);

  always #20 clk = ~clk;  // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t h=%0d v=%0d", what, $time, hcount, vcount);
    end
  endtask

  initial begin
    #(40 * 3 * HT * VT);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n;
    int eh, ev, peh, pev;
    longint hs_fall_prev, vs_fall_prev, hs_fall, vs_fall;
    logic hs_prev, vs_prev;
    int hs_low, vs_low, hs_pulses, vs_pulses, lines, frames;
    hs_fall_prev = -1; vs_fall_prev = -1;
    hs_low = 0; vs_low = 0; hs_pulses = 0; vs_pulses = 0; lines = 0; frames = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    peh = -1; pev = -1;
    hs_prev = 1'b1; vs_prev = 1'b1;
    for (n = 0; n < 2 * HT * VT + 10; n++) begin
      eh = int'(n % HT);
      ev = int'((n / HT) % VT);
      check(hcount == 10'(eh) && vcount == 10'(ev), "counter");
      check(blank == (eh >= 640 || ev >= 480), "blank");
      if (peh >= 0) begin
        check(hs_n == !(peh >= 656 && peh < 752), "hs_n");
        check(vs_n == !(pev >= 490 && pev < 492), "vs_n");
      end
      // pulse lengths and periods
      if (!hs_n) hs_low++;
      if (hs_prev && !hs_n) begin
        hs_fall = n;
        if (hs_fall_prev >= 0) begin check(hs_fall - hs_fall_prev == HT, "line period"); lines++; end
        hs_fall_prev = hs_fall;
      end
      if (!hs_prev && hs_n) begin check(hs_low == 96, "hs width"); hs_low = 0; hs_pulses++; end
      if (!vs_n) vs_low++;
      if (vs_prev && !vs_n) begin
        vs_fall = n;
        if (vs_fall_prev >= 0) begin check(vs_fall - vs_fall_prev == HT * VT, "frame period"); frames++; end
        vs_fall_prev = vs_fall;
      end
      if (!vs_prev && vs_n) begin check(vs_low == 2 * HT, "vs width"); vs_low = 0; vs_pulses++; end
      hs_prev = hs_n; vs_prev = vs_n;
      peh = eh; pev = ev;
      @(posedge clk); #1;
    end
    check(lines > 1000 && hs_pulses > 1000, "lines seen");
    check(frames == 1 && vs_pulses == 2, "frames seen");
    $display("lines=%0d frames=%0d hs_pulses=%0d vs_pulses=%0d", lines, frames, hs_pulses, vs_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
