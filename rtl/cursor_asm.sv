// cursor_asm - algorithmic state machine that moves a cursor cell in VRAM.
//
// The controller keeps a cursor position (pos_x 0..19, pos_y 0..14, in
// 32x32-pixel cells) and draws it into the video RAM. It reads the keyboard
// as the last received scan-code byte (key) and reacts to the break sequence
// of an arrow key: it waits for F0, then for the byte after it, and takes
// 75/72/6B/74 as up/down/left/right. Only the last two bytes of the
// three-byte break sequence (E0 F0 xx) are examined. A move erases the old
// cell (writes the background colour), updates the position and writes the
// cursor colour at the new cell.
//
// States, as in the published flowchart:
//   S1  load the cursor colour                    (waits for v_sync low)
//   S2  write the cursor at its position           (waits for v_sync low)
//   S3  wait for key = F0
//   S4  wait while key = F0; decode the next byte into the direction
//   S5  load the background colour                (waits for v_sync low)
//   S6  write it at the old position              (waits for v_sync low)
//   S7  update X, Y from the direction
//   S8  load the cursor colour
//   S9  write the cursor at the new position       (waits for v_sync low)
//   S10 clean up, back to the F0 test of S3
// A state marked "waits for v_sync low" stays put while vert_sync is 1, so
// every video-RAM access falls in the 64 us vertical sync pulse, when the
// scanning engine does not need the memory.
//
// Interface: clk 25 MHz, rst_n active-low synchronous reset (back to S1,
// position to (X0, Y0)). wr is the write request to the video RAM: wr.we is
// high for exactly one clock in S2, S6 and S9 once vert_sync is low, with
// wr.addr = {pos_y, pos_x} and wr.data the colour register. The position
// stops at the screen edges.
//
// The state sequence, the key codes and the v_sync rule are the published
// design's. This design's own choices: a one-clock write strobe in place of
// toggling the memory clock, cursor white on black, start at cell (0,0),
// keys other than the four arrows ignored (S4 goes to S10), clamping at the
// edges.
module cursor_asm
  import vga_pkg::*;
#(
  parameter color_t CURSOR_COLOR = WHITE,
  parameter color_t BG_COLOR     = BLACK,
  parameter coord_t X0           = '0,
  parameter coord_t Y0           = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       vert_sync,
  input  logic [7:0] key,
  output vram_wr_t   wr,
  output coord_t     pos_x,
  output coord_t     pos_y
);

  typedef enum logic [3:0] {S1, S2, S3, S4, S5, S6, S7, S8, S9, S10} state_t;

  state_t state;
  dir_t   dir;
  color_t color;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S1;
      pos_x <= X0;
      pos_y <= Y0;
      dir   <= DIR_UP;
      color <= BG_COLOR;
    end else begin
      unique case (state)
        S1: if (!vert_sync) begin
              color <= CURSOR_COLOR;
              state <= S2;
            end
        S2: if (!vert_sync) state <= S3;
        S3: if (key == KEY_BREAK) state <= S4;
        S4: unique case (key)
              KEY_BREAK: state <= S4;
              KEY_UP:    begin dir <= DIR_UP;    state <= S5; end
              KEY_DOWN:  begin dir <= DIR_DOWN;  state <= S5; end
              KEY_LEFT:  begin dir <= DIR_LEFT;  state <= S5; end
              KEY_RIGHT: begin dir <= DIR_RIGHT; state <= S5; end
              default:   state <= S10;
            endcase
        S5: if (!vert_sync) begin
              color <= BG_COLOR;
              state <= S6;
            end
        S6: if (!vert_sync) state <= S7;
        S7: begin
              unique case (dir)
                DIR_UP:    if (pos_y != '0) pos_y <= pos_y - 1'b1;
                DIR_DOWN:  if (pos_y != coord_t'(GRID_H - 1)) pos_y <= pos_y + 1'b1;
                DIR_LEFT:  if (pos_x != '0) pos_x <= pos_x - 1'b1;
                DIR_RIGHT: if (pos_x != coord_t'(GRID_W - 1)) pos_x <= pos_x + 1'b1;
              endcase
              state <= S8;
            end
        S8: begin
              color <= CURSOR_COLOR;
              state <= S9;
            end
        S9: if (!vert_sync) state <= S10;
        S10: state <= S3;
        default: state <= S1;
      endcase
    end
  end

  always_comb begin
    wr.we   = ((state == S2) || (state == S6) || (state == S9)) && !vert_sync;
    wr.addr = {pos_y, pos_x};
    wr.data = color;
  end

  // Rule of the shared video-RAM port: the drawing side may only write while
  // the vertical sync pulse gives it the RAM.
  a_write_in_sync_pulse: assert property (@(posedge clk) disable iff (!rst_n) wr.we |-> !vert_sync)
    else $error("video-RAM write outside the vertical sync pulse");

endmodule
