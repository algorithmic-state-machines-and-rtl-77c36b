// vram_labs_top - the four video-RAM systems side by side.
//
// Holds the keyboard-driven cursor system (lab5_cursor), the ROM-driven
// animation system (lab5a_animation), the painting program with an edit
// mode built on the cursor system (lab5_paint) and the animation whose block
// is moved with the arrow keys (lab5a_move). They are independent designs
// that share building blocks (sync generator, address translator, video RAM,
// keyboard receiver) but no signals; each has its own clock, reset, keyboard
// and VGA pins. The cursor system's pins keep the published pin names; the
// others carry the prefixes anim_, paint_ and move_.
//
// Timing and behaviour are those of the four systems; see their headers.
module vram_labs_top (
  // cursor system
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
  // animation system
  input  logic       anim_clk25MHz,
  input  logic       anim_reset,
  output logic       anim_red_out,
  output logic       anim_green_out,
  output logic       anim_blue_out,
  output logic       anim_horiz_sync_out,
  output logic       anim_vert_sync_out,
  // painting program
  input  logic       paint_clk25MHz,
  input  logic       paint_reset,
  input  logic       paint_keyboard_clk,
  input  logic       paint_keyboard_data,
  output logic       paint_red_out,
  output logic       paint_green_out,
  output logic       paint_blue_out,
  output logic       paint_horiz_sync_out,
  output logic       paint_vert_sync_out,
  output logic [6:0] paint_display1,
  output logic [6:0] paint_display2,
  output logic       paint_edit_led,
  // movable animation
  input  logic       move_clk25MHz,
  input  logic       move_reset,
  input  logic       move_keyboard_clk,
  input  logic       move_keyboard_data,
  output logic       move_red_out,
  output logic       move_green_out,
  output logic       move_blue_out,
  output logic       move_horiz_sync_out,
  output logic       move_vert_sync_out,
  output logic [6:0] move_display1,
  output logic [6:0] move_display2
);

  lab5_cursor u_cursor (
    .clk25MHz, .reset, .keyboard_clk, .keyboard_data,
    .red_out, .green_out, .blue_out, .horiz_sync_out, .vert_sync_out,
    .display1, .display2
  );

  lab5a_animation u_anim (
    .clk25MHz       (anim_clk25MHz),
    .reset          (anim_reset),
    .red_out        (anim_red_out),
    .green_out      (anim_green_out),
    .blue_out       (anim_blue_out),
    .horiz_sync_out (anim_horiz_sync_out),
    .vert_sync_out  (anim_vert_sync_out)
  );

  lab5_paint u_paint (
    .clk25MHz       (paint_clk25MHz),
    .reset          (paint_reset),
    .keyboard_clk   (paint_keyboard_clk),
    .keyboard_data  (paint_keyboard_data),
    .red_out        (paint_red_out),
    .green_out      (paint_green_out),
    .blue_out       (paint_blue_out),
    .horiz_sync_out (paint_horiz_sync_out),
    .vert_sync_out  (paint_vert_sync_out),
    .display1       (paint_display1),
    .display2       (paint_display2),
    .edit_led       (paint_edit_led)
  );

  lab5a_move u_move (
    .clk25MHz       (move_clk25MHz),
    .reset          (move_reset),
    .keyboard_clk   (move_keyboard_clk),
    .keyboard_data  (move_keyboard_data),
    .red_out        (move_red_out),
    .green_out      (move_green_out),
    .blue_out       (move_blue_out),
    .horiz_sync_out (move_horiz_sync_out),
    .vert_sync_out  (move_vert_sync_out),
    .display1       (move_display1),
    .display2       (move_display2)
  );

endmodule
