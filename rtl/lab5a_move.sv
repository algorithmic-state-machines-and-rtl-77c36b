// lab5a_move - video-RAM animation whose block is moved with the arrow keys.
//
// The animation system with the keyboard put back: a PS/2 keyboard receiver
// and an arrow-key decoder feed move commands to the animation state
// machine, which keeps stepping through the 8 ROM patterns while the
// 4x4-cell block is moved around the 20x15 grid one cell per key release.
// The last scan code is shown on the two seven-segment displays.
//
// Interface: clk25MHz, reset (active low), keyboard_clk/keyboard_data, the
// RGB and sync pins, display1/display2 (as in the cursor system). Timing: a
// move takes effect at the next vertical sync pulse; the pattern changes
// every FRAMES_PER_STEP frames.
module lab5a_move
  import vga_pkg::*;
#(
  parameter int unsigned FRAMES_PER_STEP = 6,
  parameter int unsigned KBD_TIMEOUT     = 12500
) (
  input  logic       clk25MHz,
  input  logic       reset,
  input  logic       keyboard_clk,
  input  logic       keyboard_data,
  output logic       red_out,
  output logic       green_out,
  output logic       blue_out,
  output logic       horiz_sync_out,
  output logic       vert_sync_out,
  output logic [6:0] display1,
  output logic [6:0] display2
);

  logic        v_sync;
  vram_wr_t    wr;
  logic [4:0]  rom_addr;
  logic [11:0] rom_data;
  logic [7:0]  scan_code;
  logic        scan_ready, move;
  dir_t        dir;

  scan_engine u_scan (
    .clk (clk25MHz), .rst_n (reset), .wr, .v_sync, .rd_data (),
    .red_out, .green_out, .blue_out, .horiz_sync_out, .vert_sync_out
  );

  ps2_keyboard #(.TIMEOUT(KBD_TIMEOUT)) u_kbd (
    .clk (clk25MHz), .rst_n (reset), .keyboard_clk, .keyboard_data,
    .scan_code, .scan_ready
  );

  arrow_decoder u_dec (
    .clk (clk25MHz), .rst_n (reset), .scan_code, .scan_ready, .move, .dir
  );

  anim_rom u_rom (.clk (clk25MHz), .addr (rom_addr), .data (rom_data));

  anim_move_asm #(.FRAMES_PER_STEP(FRAMES_PER_STEP)) u_anim (
    .clk (clk25MHz), .rst_n (reset), .vert_sync (v_sync), .move, .dir,
    .rom_addr, .rom_data, .wr, .pattern (), .pos_x (), .pos_y ()
  );

  hex7seg u_hi (.hex (scan_code[7:4]), .seg_n (display1));
  hex7seg u_lo (.hex (scan_code[3:0]), .seg_n (display2));

endmodule
