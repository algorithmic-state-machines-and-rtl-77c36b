// tb_anim_asm - checks the animation state machine with the pattern ROM.
//
// vert_sync is driven as a shortened frame (high 300 clocks, low 40). The
// testbench keeps its own picture of the video RAM from the write requests.
// With FRAMES_PER_STEP = 3 it checks that a copy starts at the first sync
// pulse after reset and then at every third pulse, that each copy writes the
// 16 cells of the 4x4 block at (POS_X, POS_Y) and nothing else, that the
// block then holds pattern p (pixel (r,c) = (r+c+p) mod 8, worked out here),
// that the patterns go 0..7 and wrap, and that no write falls outside a
// sync pulse. The copy time (one fetch and four writes per row) is checked as well.
module tb_anim_asm;
  timeunit 1ns; timeprecision 1ns;
  import vga_pkg::*;

  localparam int FPS = 3;
  localparam int PX = 8, PY = 6;

  logic clk = 0, rst_n = 0, vert_sync = 1;
  logic [4:0] rom_addr;
  logic [11:0] rom_data;
  vram_wr_t wr;
  logic [2:0] pattern;

  color_t pic [1024];
  int checks = 0, failures = 0;
  int frame = 0, writes = 0, writes_high = 0, outside = 0;
  int first_w, last_w, cyc = 0;

  anim_rom u_rom (.clk, .addr (rom_addr), .data (rom_data));
  anim_asm #(.FRAMES_PER_STEP(FPS), .POS_X(5'(PX)), .POS_Y(5'(PY))) dut (.*);

  always #20 clk = ~clk;

  initial forever begin
    repeat (300) @(posedge clk);
    vert_sync <= 0;
    frame++;
    repeat (40) @(posedge clk);
    vert_sync <= 1;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && wr.we) begin
      if (writes % 16 == 0) first_w = cyc;
      last_w = cyc;
      writes++;
      if (vert_sync) writes_high++;
      if (!(wr.addr[4:0] >= 5'(PX) && wr.addr[4:0] < 5'(PX + 4) &&
            wr.addr[9:5] >= 5'(PY) && wr.addr[9:5] < 5'(PY + 4))) outside++;
      pic[wr.addr] = wr.data;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    for (int a = 0; a < 1024; a++) pic[a] = BLACK;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int step = 0; step < 10; step++) begin
      // wait for the sync pulse in which this step's copy happens
      wait (frame == 1 + step * FPS);
      repeat (30) @(posedge clk);
      check(writes == 16 * (step + 1), $sformatf("step %0d: %0d writes", step, writes));
      // 16 writes and the three row fetches between them: 19 clocks, first to last
      check(last_w - first_w == 18, $sformatf("step %0d: writes spread over %0d clocks", step, last_w - first_w + 1));
      bad = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        if (pic[(PY + r) * 32 + PX + c] != color_t'((r + c + step) % 8)) bad++;
      check(bad == 0, $sformatf("step %0d: %0d block cells differ from pattern %0d", step, bad, step % 8));
      // no copy in the frames in between
      if (FPS > 1) begin
        wait (frame == 2 + step * FPS);
        repeat (30) @(posedge clk);
        check(writes == 16 * (step + 1), $sformatf("step %0d: write in an off frame", step));
      end
    end
    check(writes_high == 0, $sformatf("%0d writes while vert_sync high", writes_high));
    check(outside == 0, $sformatf("%0d writes outside the block", outside));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
