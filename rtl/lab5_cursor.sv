// lab5_cursor - keyboard-driven cursor on a 20x15 video-RAM display.
//
// A white cell (the cursor) is shown on a black 640x480 screen made of 32x32-
// pixel cells. Releasing an arrow key on a PS/2 keyboard moves the cursor by
// one cell. The picture lives in a 1024 x 3-bit video RAM that the scanning
// engine reads continuously; the cursor state machine changes the RAM only
// during the vertical sync pulse. The last scan code received is shown in
// hexadecimal on two seven-segment displays (display1 high digit, display2
// low digit, segments active low, bit 0 = segment a).
//
// Interface: the ports are the board pins of the published design:
// clk25MHz (pixel clock), reset (active low, synchronous), keyboard_clk and
// keyboard_data (PS/2), red_out/green_out/blue_out, horiz_sync_out and
// vert_sync_out (VGA, syncs active low), display1/display2. Timing: a key
// release takes effect at the next vertical sync pulse (at most one frame,
// 16.8 ms), the erase and redraw both land in the same pulse.
module lab5_cursor
  import vga_pkg::*;
#(
  parameter int unsigned KBD_TIMEOUT = 12500  // PS/2 frame timeout, clocks
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

  logic       v_sync;
  logic [7:0] scan_code;
  vram_wr_t   wr;

  scan_engine u_scan (
    .clk (clk25MHz), .rst_n (reset), .wr, .v_sync, .rd_data (),
    .red_out, .green_out, .blue_out, .horiz_sync_out, .vert_sync_out
  );

  ps2_keyboard #(.TIMEOUT(KBD_TIMEOUT)) u_kbd (
    .clk (clk25MHz), .rst_n (reset), .keyboard_clk, .keyboard_data,
    .scan_code, .scan_ready ()
  );

  cursor_asm u_main (
    .clk (clk25MHz), .rst_n (reset), .vert_sync (v_sync), .key (scan_code),
    .wr, .pos_x (), .pos_y ()
  );

  hex7seg u_hi (.hex (scan_code[7:4]), .seg_n (display1));
  hex7seg u_lo (.hex (scan_code[3:0]), .seg_n (display2));

endmodule
