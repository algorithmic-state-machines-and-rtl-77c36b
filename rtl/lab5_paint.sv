// lab5_paint - single-colour painting program on the 20x15 video-RAM display.
//
// The cursor system extended with an edit mode: the Enter key switches edit
// mode on and off, and while it is on, moving the cursor with the arrow keys
// paints the cells it leaves in one colour (green). With edit mode off the
// cursor moves over the picture without changing it. Display, keyboard and
// seven-segment scan-code display are as in the cursor system; the paint
// state machine also reads the video RAM back through the scanning engine.
//
// Interface: the cursor system's pins (clk25MHz, reset active low,
// keyboard_clk/keyboard_data, RGB, horiz_sync_out/vert_sync_out,
// display1/display2) plus edit_led, high while edit mode is on. Timing: a
// key release takes effect in the next vertical sync pulse.
module lab5_paint
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
  output logic [6:0] display2,
  output logic       edit_led
);

  logic       v_sync;
  color_t     rd_data;
  logic [7:0] scan_code;
  vram_wr_t   wr;

  scan_engine u_scan (
    .clk (clk25MHz), .rst_n (reset), .wr, .v_sync, .rd_data,
    .red_out, .green_out, .blue_out, .horiz_sync_out, .vert_sync_out
  );

  ps2_keyboard #(.TIMEOUT(KBD_TIMEOUT)) u_kbd (
    .clk (clk25MHz), .rst_n (reset), .keyboard_clk, .keyboard_data,
    .scan_code, .scan_ready ()
  );

  paint_asm u_main (
    .clk (clk25MHz), .rst_n (reset), .vert_sync (v_sync), .key (scan_code),
    .rd_data, .wr, .pos_x (), .pos_y (), .edit_mode (edit_led)
  );

  hex7seg u_hi (.hex (scan_code[7:4]), .seg_n (display1));
  hex7seg u_lo (.hex (scan_code[3:0]), .seg_n (display2));

endmodule
