// lab5a_animation - 8-frame animation drawn into the video RAM.
//
// The same scanning engine and 1024 x 3-bit video RAM as the cursor system
// display a 20x15-cell screen. Instead of a keyboard, a pattern ROM holds 8
// patterns of 4x4 pixels, and the animation state machine copies the next
// pattern into a 4x4-cell block of the video RAM every FRAMES_PER_STEP
// frames, during the vertical sync pulse. Each pixel of a pattern covers one
// 32x32-pixel cell, so the block is 128x128 screen pixels.
//
// Interface: clk25MHz pixel clock, reset active low (synchronous),
// red_out/green_out/blue_out, horiz_sync_out and vert_sync_out (active low).
// Timing: the first pattern appears in the first frame after reset, and the
// pattern changes every FRAMES_PER_STEP frames (16.8 ms each).
module lab5a_animation
  import vga_pkg::*;
#(
  parameter int unsigned FRAMES_PER_STEP = 6
) (
  input  logic clk25MHz,
  input  logic reset,
  output logic red_out,
  output logic green_out,
  output logic blue_out,
  output logic horiz_sync_out,
  output logic vert_sync_out
);

  logic        v_sync;
  vram_wr_t    wr;
  logic [4:0]  rom_addr;
  logic [11:0] rom_data;
  logic [2:0]  pattern;

  scan_engine u_scan (
    .clk (clk25MHz), .rst_n (reset), .wr, .v_sync, .rd_data (),
    .red_out, .green_out, .blue_out, .horiz_sync_out, .vert_sync_out
  );

  anim_rom u_rom (.clk (clk25MHz), .addr (rom_addr), .data (rom_data));

  anim_asm #(.FRAMES_PER_STEP(FRAMES_PER_STEP)) u_anim (
    .clk (clk25MHz), .rst_n (reset), .vert_sync (v_sync),
    .rom_addr, .rom_data, .wr, .pattern
  );

endmodule
