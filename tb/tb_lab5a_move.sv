// tb_lab5a_move - end-to-end test of the keyboard-movable animation.
//
// A PS/2 keyboard model types arrow-key sequences; the testbench watches the
// VGA pins (own pixel counter from reset, pins one clock behind the scan)
// and grabs every cell centre once per frame. In every frame it checks that
// the screen is black except one 4x4 block that shows a valid pattern
// (pixel (r,c) = (r+c+n) mod 8 for some n) and records where the block is
// and which pattern it shows. After each key release (and two frames) the
// block must sit at the expected position, moved one cell and kept inside
// the grid. Over the run the pattern must keep stepping (the animation runs
// on while the block moves) and wrap at least once.
module tb_lab5a_move;
  timeunit 1ns; timeprecision 1ns;

  localparam int F = 2;

  logic clk25MHz = 0, reset = 0, keyboard_clk = 1, keyboard_data = 1;
  logic red_out, green_out, blue_out, horiz_sync_out, vert_sync_out;
  logic [6:0] display1, display2;

  int checks = 0, failures = 0, bad_sync = 0, bad_frames = 0;
  int pix = -1, frames = 0;
  logic [2:0] screen [15][20];
  int bx = -1, by = -1, bn = -1, last_n = -1, steps = 0, wraps = 0;
  int tx = 8, ty = 6, moves = 0, clamps = 0;

  lab5a_move #(.FRAMES_PER_STEP(F)) dut (.*);

  always #20 clk25MHz = ~clk25MHz;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // find the block: the 4x4 window holding a valid pattern, all else black
  task automatic scan_frame();
    int found = 0, nonblack = 0, fx = -1, fy = -1, fn = -1;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) if (screen[y][x] != 0) nonblack++;
    for (int y = 0; y <= 11; y++) for (int x = 0; x <= 16; x++) begin
      int n, ok, cnt;
      n = int'(screen[y][x]); ok = 1; cnt = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        if (screen[y + r][x + c] != 3'((r + c + n) % 8)) ok = 0;
        if (screen[y + r][x + c] != 0) cnt++;
      end
      if (ok && cnt == nonblack) begin found++; fx = x; fy = y; fn = n; end
    end
    if (found == 1) begin
      bx = fx; by = fy; bn = fn;
      if (last_n >= 0 && bn != last_n) begin
        steps++;
        if (bn < last_n) wraps++;
      end
      last_n = bn;
    end else if (frames > 0) bad_frames++;
  endtask

  always @(posedge clk25MHz) if (reset) pix <= pix + 1;
  always @(negedge clk25MHz) if (pix >= 0) begin
    automatic int p = pix % 420000;
    automatic int hc = p % 800, vc = p / 800;
    if (hc < 640 && vc < 480 && hc % 32 == 16 && vc % 32 == 16)
      screen[vc / 32][hc / 32] = {red_out, green_out, blue_out};
    if (horiz_sync_out != !(hc >= 656 && hc < 752)) bad_sync++;
    if (vert_sync_out != !(vc >= 490 && vc < 492)) bad_sync++;
    if (p == 419999) begin
      scan_frame();
      frames++;
    end
  end

  task automatic send(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~(^b), b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      keyboard_data = f[i];
      #25000 keyboard_clk = 0;
      #25000 keyboard_clk = 1;
    end
    #5000 keyboard_data = 1;
    #300000;
  endtask

  task automatic wait_frames(int n);
    int f0 = frames;
    wait (frames >= f0 + n);
  endtask

  task automatic arrow(logic [7:0] code);
    int ox = tx, oy = ty;
    send(8'hE0); send(code); send(8'hE0); send(8'hF0); send(code);
    case (code)
      8'h75: if (ty > 0)  ty--;
      8'h72: if (ty < 11) ty++;
      8'h6B: if (tx > 0)  tx--;
      8'h74: if (tx < 16) tx++;
      default: ;
    endcase
    moves++;
    if (ox == tx && oy == ty) clamps++;
    wait_frames(2);
    check(bx == tx && by == ty, $sformatf("after key %02h block at (%0d,%0d), expected (%0d,%0d)", code, bx, by, tx, ty));
  endtask

  initial begin
    #2000ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk25MHz);
    @(negedge clk25MHz) reset = 1;
    wait_frames(2);
    check(bx == 8 && by == 6, $sformatf("block after reset at (%0d,%0d)", bx, by));
    arrow(8'h74);
    arrow(8'h72);
    arrow(8'h75);
    arrow(8'h75);
    for (int i = 0; i < 7; i++) arrow(8'h75);   // into the top edge
    arrow(8'h6B);
    check(bad_frames == 0, $sformatf("%0d frames without a clean block", bad_frames));
    check(bad_sync == 0, $sformatf("%0d sync samples wrong", bad_sync));
    check(steps >= 8 && wraps >= 1, $sformatf("pattern steps %0d wraps %0d", steps, wraps));
    check(clamps > 0, "no clamped move");
    $display("moves %0d, clamped %0d, pattern steps %0d, wraps %0d", moves, clamps, steps, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
