// tb_lab5a_animation - end-to-end test of the video-RAM animation system.
//
// Watches the VGA pins only. The testbench keeps its own pixel counter from
// reset (the pins lag the scan by one clock), grabs the colour at the centre
// of every 32x32 cell in each frame, and at the end of each frame compares
// the whole 20x15 grid with what should be on screen: black, except the 4x4
// block at cells (8..11, 6..9), which shows pattern n = ((f - 1) / F) mod 8
// in frame f >= 1, where pixel (r, c) of pattern n has colour (r + c + n)
// mod 8 and F is FRAMES_PER_STEP (the first copy is made in the sync pulse
// of frame 0). Runs long enough for the pattern number to wrap.
module tb_lab5a_animation;
  timeunit 1ns; timeprecision 1ns;

  localparam int F = 2;
  localparam int NFRAMES = 2 + 9 * F;

  logic clk25MHz = 0, reset = 0;
  logic red_out, green_out, blue_out, horiz_sync_out, vert_sync_out;

  int checks = 0, failures = 0, bad_sync = 0;
  int pix = -1, frames = 0, steps_seen = 0, wraps = 0, last_n = 0;
  logic [2:0] screen [15][20];

  lab5a_animation #(.FRAMES_PER_STEP(F)) dut (.*);

  always #20 clk25MHz = ~clk25MHz;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_frame(int f);
    int n, bad = 0;
    logic [2:0] e;
    n = (f >= 1) ? ((f - 1) / F) % 8 : -1;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) begin
      if (n >= 0 && x >= 8 && x < 12 && y >= 6 && y < 10) e = 3'((y - 6 + x - 8 + n) % 8);
      else e = 3'b000;
      if (screen[y][x] != e) bad++;
    end
    check(bad == 0, $sformatf("frame %0d: %0d cells differ from pattern %0d", f, bad, n));
    if (n >= 0 && n != last_n) begin
      steps_seen++;
      if (n == 0) wraps++;
    end
    if (n >= 0) last_n = n;
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
      check_frame(frames);
      frames++;
    end
  end

  initial begin
    #1000ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk25MHz);
    @(negedge clk25MHz) reset = 1;
    wait (frames == NFRAMES);
    check(bad_sync == 0, $sformatf("%0d sync samples wrong", bad_sync));
    check(steps_seen >= 8, $sformatf("only %0d pattern steps", steps_seen));
    check(wraps >= 1, "pattern number never wrapped");
    $display("pattern steps %0d, wraps %0d", steps_seen, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
