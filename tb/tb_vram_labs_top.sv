// tb_vram_labs_top - full-size test of all four video-RAM systems together.
//
// Runs the top with every parameter at its default. One PS/2 keyboard model
// types into the keyboard pins of the cursor, painting and movable-animation
// systems at once (they share the testbench clock but are separate designs);
// the ROM animation system runs on its own, skewed clock. For each system the
// testbench keeps its own pixel counter from reset (pins lag the scan by one
// clock), grabs every cell centre once per frame and checks:
//   cursor     one white cell at the expected place on black
//   painting   the expected green trail, the white cursor, edit_led
//   animation  the 4x4 block at cells (8..11, 6..9) with pattern
//              ((f - 1) / 6) mod 8 in frame f
//   movable    a clean 4x4 pattern block at the expected position
// and the sync pins of all four. Mechanisms that must each occur at least
// once, and are counted: cursor moves in all four directions, a clamped
// move, a dropped bad-parity byte, an ignored non-arrow key, an edit-mode
// toggle, a painted cell, a painted cell uncovered again, a pattern step and
// a pattern wrap in both animations, a moved animated block.
module tb_vram_labs_top;
  timeunit 1ns; timeprecision 1ns;

  localparam int F = 6;   // default frames per pattern
  localparam int NFRAMES = 2 + 9 * F;

  logic clk = 0, rst = 0, kclk = 1, kdat = 1;
  logic anim_clk = 0, anim_rst = 0;

  logic red_out, green_out, blue_out, horiz_sync_out, vert_sync_out;
  logic [6:0] display1, display2;
  logic anim_red_out, anim_green_out, anim_blue_out, anim_horiz_sync_out, anim_vert_sync_out;
  logic paint_red_out, paint_green_out, paint_blue_out, paint_horiz_sync_out, paint_vert_sync_out, paint_edit_led;
  logic [6:0] paint_display1, paint_display2;
  logic move_red_out, move_green_out, move_blue_out, move_horiz_sync_out, move_vert_sync_out;
  logic [6:0] move_display1, move_display2;

  vram_labs_top dut (
    .clk25MHz (clk), .reset (rst), .keyboard_clk (kclk), .keyboard_data (kdat),
    .red_out, .green_out, .blue_out, .horiz_sync_out, .vert_sync_out, .display1, .display2,
    .anim_clk25MHz (anim_clk), .anim_reset (anim_rst),
    .anim_red_out, .anim_green_out, .anim_blue_out, .anim_horiz_sync_out, .anim_vert_sync_out,
    .paint_clk25MHz (clk), .paint_reset (rst), .paint_keyboard_clk (kclk), .paint_keyboard_data (kdat),
    .paint_red_out, .paint_green_out, .paint_blue_out, .paint_horiz_sync_out, .paint_vert_sync_out,
    .paint_display1, .paint_display2, .paint_edit_led,
    .move_clk25MHz (clk), .move_reset (rst), .move_keyboard_clk (kclk), .move_keyboard_data (kdat),
    .move_red_out, .move_green_out, .move_blue_out, .move_horiz_sync_out, .move_vert_sync_out,
    .move_display1, .move_display2
  );

  always #20 clk = ~clk;
  initial begin
    #7;
    forever #20 anim_clk = ~anim_clk;
  end

  int checks = 0, failures = 0, bad_sync = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit sync_ok(int hc, int vc, logic hs, logic vs);
    return (hs == !(hc >= 656 && hc < 752)) && (vs == !(vc >= 490 && vc < 492));
  endfunction

  // ---------------- screens of the three keyboard systems (shared clock)
  int pix = -1, frames = 0;
  logic [2:0] cscr [15][20];
  logic [2:0] pscr [15][20];
  logic [2:0] mscr [15][20];

  // movable block tracking
  int bx = -1, by = -1, last_mn = -1, msteps = 0, mwraps = 0, bad_mframes = 0;

  task automatic scan_move_frame();
    int found = 0, nonblack = 0, fx = -1, fy = -1, fn = -1;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) if (mscr[y][x] != 0) nonblack++;
    for (int y = 0; y <= 11; y++) for (int x = 0; x <= 16; x++) begin
      int n, ok, cnt;
      n = int'(mscr[y][x]); ok = 1; cnt = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        if (mscr[y + r][x + c] != 3'((r + c + n) % 8)) ok = 0;
        if (mscr[y + r][x + c] != 0) cnt++;
      end
      if (ok && cnt == nonblack) begin found++; fx = x; fy = y; fn = n; end
    end
    if (found == 1) begin
      bx = fx; by = fy;
      if (last_mn >= 0 && fn != last_mn) begin
        msteps++;
        if (fn < last_mn) mwraps++;
      end
      last_mn = fn;
    end else if (frames > 0) bad_mframes++;
  endtask

  always @(posedge clk) if (rst) pix <= pix + 1;
  always @(negedge clk) if (pix >= 0) begin
    automatic int p = pix % 420000;
    automatic int hc = p % 800, vc = p / 800;
    if (hc < 640 && vc < 480 && hc % 32 == 16 && vc % 32 == 16) begin
      cscr[vc / 32][hc / 32] = {red_out, green_out, blue_out};
      pscr[vc / 32][hc / 32] = {paint_red_out, paint_green_out, paint_blue_out};
      mscr[vc / 32][hc / 32] = {move_red_out, move_green_out, move_blue_out};
    end
    if (!sync_ok(hc, vc, horiz_sync_out, vert_sync_out)) bad_sync++;
    if (!sync_ok(hc, vc, paint_horiz_sync_out, paint_vert_sync_out)) bad_sync++;
    if (!sync_ok(hc, vc, move_horiz_sync_out, move_vert_sync_out)) bad_sync++;
    if (p == 419999) begin
      scan_move_frame();
      frames++;
    end
  end

  // ---------------- ROM animation system (own clock)
  int apix = -1, aframes = 0, asteps = 0, awraps = 0, last_an = 0;
  logic [2:0] ascr [15][20];

  task automatic check_anim_frame(int f);
    int n, bad = 0;
    logic [2:0] e;
    n = (f >= 1) ? ((f - 1) / F) % 8 : -1;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) begin
      if (n >= 0 && x >= 8 && x < 12 && y >= 6 && y < 10) e = 3'((y - 6 + x - 8 + n) % 8);
      else e = 3'b000;
      if (ascr[y][x] != e) bad++;
    end
    check(bad == 0, $sformatf("animation frame %0d: %0d cells differ from pattern %0d", f, bad, n));
    if (n >= 0 && n != last_an) begin
      asteps++;
      if (n == 0) awraps++;
    end
    if (n >= 0) last_an = n;
  endtask

  always @(posedge anim_clk) if (anim_rst) apix <= apix + 1;
  always @(negedge anim_clk) if (apix >= 0) begin
    automatic int p = apix % 420000;
    automatic int hc = p % 800, vc = p / 800;
    if (hc < 640 && vc < 480 && hc % 32 == 16 && vc % 32 == 16)
      ascr[vc / 32][hc / 32] = {anim_red_out, anim_green_out, anim_blue_out};
    if (!sync_ok(hc, vc, anim_horiz_sync_out, anim_vert_sync_out)) bad_sync++;
    if (p == 419999) begin
      check_anim_frame(aframes);
      aframes++;
    end
  end

  // ---------------- keyboard and expected state
  int cx = 0, cy = 0;                 // cursor system
  int px = 0, py = 0;                 // painting system
  bit painted [15][20];
  bit edit = 0;
  int tx = 8, ty = 6;                 // movable block
  int moves[4] = '{0, 0, 0, 0};
  int clamps = 0, parity_drops = 0, ignored = 0, edits = 0, paints = 0, uncovered = 0, block_moves = 0;

  task automatic send(logic [7:0] b, bit bad_parity = 0);
    logic [10:0] f;
    f = {1'b1, ~(^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kdat = f[i];
      #25000 kclk = 0;
      #25000 kclk = 1;
    end
    #5000 kdat = 1;
    #300000;
  endtask

  task automatic wait_frames(int n);
    int f0 = frames;
    wait (frames >= f0 + n);
  endtask

  task automatic check_all(string what);
    int cw = 0, co = 0, pbad = 0;
    logic [2:0] e;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) begin
      if (cscr[y][x] == 3'b111) cw++;
      else if (cscr[y][x] != 3'b000) co++;
      e = (x == px && y == py) ? 3'b111 : painted[y][x] ? 3'b010 : 3'b000;
      if (pscr[y][x] != e) pbad++;
    end
    check(cw == 1 && co == 0 && cscr[cy][cx] == 3'b111,
          $sformatf("%s: cursor system (%0d white, %0d other, expected at %0d,%0d)", what, cw, co, cx, cy));
    check(pbad == 0, $sformatf("%s: painting system, %0d cells wrong", what, pbad));
    check(paint_edit_led == edit, $sformatf("%s: edit_led %0d", what, paint_edit_led));
    check(bx == tx && by == ty, $sformatf("%s: block at (%0d,%0d), expected (%0d,%0d)", what, bx, by, tx, ty));
  endtask

  function automatic void step(ref int x, ref int y, input logic [7:0] code, input int xmax, input int ymax);
    case (code)
      8'h75: if (y > 0) y--;
      8'h72: if (y < ymax) y++;
      8'h6B: if (x > 0) x--;
      8'h74: if (x < xmax) x++;
      default: ;
    endcase
  endfunction

  task automatic arrow(logic [7:0] code);
    int ox = cx, oy = cy, otx = tx, oty = ty;
    bit was = painted[py][px];
    send(8'hE0); send(code); send(8'hE0); send(8'hF0); send(code);
    step(cx, cy, code, 19, 14);
    if (edit) begin painted[py][px] = 1; paints++; end
    else if (was) uncovered++;
    step(px, py, code, 19, 14);
    step(tx, ty, code, 16, 11);
    case (code)
      8'h75: moves[0]++;
      8'h72: moves[1]++;
      8'h6B: moves[2]++;
      default: moves[3]++;
    endcase
    if (ox == cx && oy == cy) clamps++;
    if (otx != tx || oty != ty) block_moves++;
    wait_frames(2);
    check_all($sformatf("after key %02h", code));
  endtask

  task automatic enter();
    send(8'h5A); send(8'hF0); send(8'h5A);
    edit = !edit;
    edits++;
    wait_frames(2);
    check_all("after Enter");
  endtask

  initial begin
    #3000ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge anim_clk);
    @(negedge anim_clk) anim_rst = 1;
  end

  initial begin
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) painted[y][x] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1;
    wait_frames(2);
    check_all("after reset");
    arrow(8'h75);                 // up at the top edge: clamped for the cursors
    arrow(8'h74); arrow(8'h74);   // right
    enter();                      // painting: edit mode on
    arrow(8'h72); arrow(8'h72);   // down, painting
    enter();                      // edit mode off
    arrow(8'h6B);                 // left
    arrow(8'h75);                 // up onto a painted cell
    arrow(8'h74);                 // right: the painted cell is uncovered
    // bad parity on the last byte: the release is lost everywhere
    send(8'hE0); send(8'h72); send(8'hE0); send(8'hF0); send(8'h72, 1);
    wait_frames(2);
    check_all("after a bad-parity byte");
    parity_drops++;
    send(8'h29); send(8'hF0); send(8'h29);   // space bar: ignored
    wait_frames(2);
    check_all("after the space bar");
    ignored++;
    arrow(8'h75);
    check(display1 == 7'b1111000 && display2 == 7'b0010010, $sformatf("displays %b %b after 75", display1, display2));
    check(paint_display1 == display1 && move_display2 == display2, "scan-code displays of the other systems");
    wait (aframes >= NFRAMES && frames >= NFRAMES);
    check(bad_sync == 0, $sformatf("%0d sync samples wrong", bad_sync));
    check(bad_mframes == 0, $sformatf("%0d frames without a clean movable block", bad_mframes));
    for (int i = 0; i < 4; i++) check(moves[i] > 0, $sformatf("direction %0d never used", i));
    check(clamps > 0, "no clamped move");
    check(edits >= 2 && paints >= 1 && uncovered >= 1, $sformatf("edits %0d paints %0d uncovered %0d", edits, paints, uncovered));
    check(asteps >= 8 && awraps >= 1, $sformatf("animation steps %0d wraps %0d", asteps, awraps));
    check(msteps >= 8 && mwraps >= 1, $sformatf("movable animation steps %0d wraps %0d", msteps, mwraps));
    check(block_moves > 0, "animated block never moved");
    $display("cursor moves up/down/left/right %0d/%0d/%0d/%0d, clamped %0d, bad-parity bytes %0d, ignored keys %0d",
             moves[0], moves[1], moves[2], moves[3], clamps, parity_drops, ignored);
    $display("painting: edit toggles %0d, painted %0d, uncovered %0d", edits, paints, uncovered);
    $display("animation steps %0d wraps %0d; movable animation steps %0d wraps %0d, block moves %0d",
             asteps, awraps, msteps, mwraps, block_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
