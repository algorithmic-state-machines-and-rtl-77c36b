// paint_asm - state machine for a single-colour painting program in VRAM.
//
// Extends the cursor state machine with an edit mode. The Enter key (break
// sequence F0 5A) toggles edit mode. Outside edit mode the arrow keys move
// the cursor without changing the picture: before the cursor is drawn on a
// cell, the cell's colour is read back from the video RAM and kept in
// 'saved', and it is put back when the cursor leaves. In edit mode the cell
// the cursor leaves is painted with PAINT_COLOR, so moving draws a trail.
//
// States (the cursor machine's, with a read-back step added):
//   S1  load the cursor colour                    (waits for v_sync low)
//   S2  write the cursor at its position           (waits for v_sync low)
//   S3  wait for key = F0
//   S4  wait while key = F0; arrow -> S5 with the direction, Enter -> toggle
//       edit mode and go to S11, any other key -> S11
//   S5  load the colour to leave behind: PAINT_COLOR in edit mode, else the
//       saved colour                               (waits for v_sync low)
//   S6  write it at the old position               (waits for v_sync low)
//   S7  update X, Y from the direction (clamped at the screen edges)
//   S8  put the new position on the RAM address   (waits for v_sync low)
//   S9  take the RAM word into 'saved'; load the cursor colour
//   S10 write the cursor at the new position       (waits for v_sync low)
//   S11 clean up, back to the F0 test of S3
//
// Interface: as cursor_asm, plus rd_data (the RAM word at wr.addr, one clock
// after a clock with v_sync low, from scan_engine) and edit_mode (high in
// edit mode, for an indicator). wr.we is high for one clock in S2, S6 and
// S10 once v_sync is low.
//
// The edit mode, the Enter key and the single paint colour are the published
// requirement for the painting program. The read-back that keeps the picture
// intact under a moving cursor, the colours (cursor white, paint green, black
// background) and Enter acting as a toggle are this design's own reading.
module paint_asm
  import vga_pkg::*;
#(
  parameter color_t CURSOR_COLOR = WHITE,
  parameter color_t PAINT_COLOR  = 3'b010,
  parameter color_t BG_COLOR     = BLACK,
  parameter coord_t X0           = '0,
  parameter coord_t Y0           = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       vert_sync,
  input  logic [7:0] key,
  input  color_t     rd_data,
  output vram_wr_t   wr,
  output coord_t     pos_x,
  output coord_t     pos_y,
  output logic       edit_mode
);

  typedef enum logic [3:0] {S1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11} state_t;

  state_t state;
  dir_t   dir;
  color_t color, saved;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S1;
      pos_x     <= X0;
      pos_y     <= Y0;
      dir       <= DIR_UP;
      color     <= BG_COLOR;
      saved     <= BG_COLOR;
      edit_mode <= 1'b0;
    end else begin
      unique case (state)
        S1:  if (!vert_sync) begin
               color <= CURSOR_COLOR;
               state <= S2;
             end
        S2:  if (!vert_sync) state <= S3;
        S3:  if (key == KEY_BREAK) state <= S4;
        S4:  unique case (key)
               KEY_BREAK: state <= S4;
               KEY_UP:    begin dir <= DIR_UP;    state <= S5; end
               KEY_DOWN:  begin dir <= DIR_DOWN;  state <= S5; end
               KEY_LEFT:  begin dir <= DIR_LEFT;  state <= S5; end
               KEY_RIGHT: begin dir <= DIR_RIGHT; state <= S5; end
               KEY_ENTER: begin edit_mode <= !edit_mode; state <= S11; end
               default:   state <= S11;
             endcase
        S5:  if (!vert_sync) begin
               color <= edit_mode ? PAINT_COLOR : saved;
               state <= S6;
             end
        S6:  if (!vert_sync) state <= S7;
        S7:  begin
               unique case (dir)
                 DIR_UP:    if (pos_y != '0) pos_y <= pos_y - 1'b1;
                 DIR_DOWN:  if (pos_y != coord_t'(GRID_H - 1)) pos_y <= pos_y + 1'b1;
                 DIR_LEFT:  if (pos_x != '0) pos_x <= pos_x - 1'b1;
                 DIR_RIGHT: if (pos_x != coord_t'(GRID_W - 1)) pos_x <= pos_x + 1'b1;
               endcase
               state <= S8;
             end
        S8:  if (!vert_sync) state <= S9;
        S9:  begin
               saved <= rd_data;
               color <= CURSOR_COLOR;
               state <= S10;
             end
        S10: if (!vert_sync) state <= S11;
        S11: state <= S3;
        default: state <= S1;
      endcase
    end
  end

  always_comb begin
    wr.we   = ((state == S2) || (state == S6) || (state == S10)) && !vert_sync;
    wr.addr = {pos_y, pos_x};
    wr.data = color;
  end

  // Rule of the shared video-RAM port: the drawing side may only write while
  // the vertical sync pulse gives it the RAM.
  a_write_in_sync_pulse: assert property (@(posedge clk) disable iff (!rst_n) wr.we |-> !vert_sync)
    else $error("video-RAM write outside the vertical sync pulse");

endmodule
