// tb_anim_move_asm - checks the movable animation state machine.
//
// vert_sync is a shortened frame (high 300 clocks, low 40); the pattern ROM
// is the real one. The testbench keeps its own picture of the video RAM from
// the write requests and, after every sync pulse, compares all 1024 words
// with the expected screen: black except the 4x4 block at the expected
// position showing the expected pattern (pixel (r,c) of pattern n is
// (r+c+n) mod 8). The pattern advances every FRAMES_PER_STEP = 3 frames from
// pattern 0 in the first pulse. Move commands in all four directions, moves
// into the edges (block kept within cells 0..16 by 0..11) and two moves in
// one frame are applied at random moments. Writes must stay inside the sync
// pulse.
module tb_anim_move_asm;
  timeunit 1ns; timeprecision 1ns;
  import vga_pkg::*;

  localparam int F = 3;

  logic clk = 0, rst_n = 0, vert_sync = 1;
  logic move = 0;
  dir_t dir = DIR_UP;
  logic [4:0] rom_addr;
  logic [11:0] rom_data;
  vram_wr_t wr;
  logic [2:0] pattern;
  coord_t pos_x, pos_y;

  color_t pic [1024];
  int checks = 0, failures = 0, writes_high = 0, pulses = 0;
  int tx = 8, ty = 6, erases = 0, clamps = 0, steps = 0;

  anim_rom u_rom (.clk, .addr (rom_addr), .data (rom_data));
  anim_move_asm #(.FRAMES_PER_STEP(F)) dut (.*);

  always #20 clk = ~clk;

  always @(posedge clk) if (rst_n && wr.we) begin
    if (vert_sync) writes_high++;
    pic[wr.addr] <= wr.data;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_picture(int n);
    int bad = 0;
    color_t e;
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) begin
      if (x >= tx && x < tx + 4 && y >= ty && y < ty + 4) e = color_t'((y - ty + x - tx + n) % 8);
      else e = BLACK;
      if (pic[y * 32 + x] != e) bad++;
    end
    check(bad == 0, $sformatf("pulse %0d: %0d cells wrong (block %0d,%0d pattern %0d)", pulses, bad, tx, ty, n));
  endtask

  task automatic do_move(dir_t d);
    @(negedge clk); move = 1; dir = d;
    @(negedge clk); move = 0;
    case (d)
      DIR_UP:    if (ty > 0)  ty--; else clamps++;
      DIR_DOWN:  if (ty < 11) ty++; else clamps++;
      DIR_LEFT:  if (tx > 0)  tx--; else clamps++;
      DIR_RIGHT: if (tx < 16) tx++; else clamps++;
    endcase
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int moved_from_x, moved_from_y;
    for (int a = 0; a < 1024; a++) pic[a] = BLACK;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (pulses = 1; pulses <= 150; pulses++) begin
      repeat (300) @(posedge clk);
      moved_from_x = tx; moved_from_y = ty;
      vert_sync <= 0;
      repeat (40) @(posedge clk);
      vert_sync <= 1;
      repeat (2) @(posedge clk);
      check_picture(((pulses - 1) / F) % 8);
      if ((pulses - 1) % F == 0) steps++;
      // moves for the next frame, applied during the displayed part
      repeat (50) @(posedge clk);
      if (pulses < 40)       begin if (pulses % 2 == 0) do_move(DIR_LEFT); end
      else if (pulses < 60)  do_move(DIR_UP);
      else if (pulses < 85)  do_move(DIR_RIGHT);
      else if (pulses < 105) do_move(DIR_DOWN);
      else if (pulses % 3 == 0) begin do_move(dir_t'($urandom_range(0, 3))); do_move(dir_t'($urandom_range(0, 3))); end
    end
    check(writes_high == 0, $sformatf("%0d writes while vert_sync high", writes_high));
    check(clamps > 0 && steps >= 9, $sformatf("clamps %0d steps %0d", clamps, steps));
    $display("pattern steps %0d, clamped moves %0d", steps, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
