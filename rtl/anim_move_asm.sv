// anim_move_asm - animation state machine whose 4x4 block can be moved.
//
// Does what anim_asm does (every FRAMES_PER_STEP frames, during the vertical
// sync pulse, copy the next of the 8 ROM patterns into a 4x4-cell block of
// the video RAM) and also accepts move commands. A move changes the target
// position by one cell, kept inside the 20x15 grid (top-left cell 0..16 by
// 0..11). At the next sync pulse after the target changed, the machine first
// blanks the 16 cells at the drawn position, then draws the current pattern
// at the new one; the animation keeps running meanwhile.
//
// States:
//   WAIT_HIGH  wait for vert_sync = 1
//   WAIT_LOW   wait for vert_sync = 0; count the frame; decide whether to
//              erase (block moved), draw (moved or step due) or do nothing
//   ERASE      write BG_COLOR to cell (col, row) of the old block, 16 clocks
//   FETCH      present {pattern, row} to the ROM
//   WRITE      write pixel col of the ROM word at the new block
// An erase plus a draw takes 16 + 20 clocks, well inside the 1600-clock
// sync pulse.
//
// Interface: clk, rst_n (active-low synchronous reset: pattern 0 drawn at
// (X0, Y0) in the first sync pulse); move/dir from arrow_decoder; rom_addr
// and rom_data to anim_rom (one-clock read); wr to the video RAM; pattern is
// the pattern on screen, pos_x/pos_y the drawn block position.
//
// Moving the animated block with the arrow keys while it keeps animating is
// the published requirement; the erase-then-draw scheme, the clamping and
// the one-cell step are this design's own.
module anim_move_asm
  import vga_pkg::*;
#(
  parameter int unsigned FRAMES_PER_STEP = 6,
  parameter coord_t      X0              = 5'd8,
  parameter coord_t      Y0              = 5'd6,
  parameter color_t      BG_COLOR        = BLACK
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vert_sync,
  input  logic        move,
  input  dir_t        dir,
  output logic [4:0]  rom_addr,
  input  logic [11:0] rom_data,
  output vram_wr_t    wr,
  output logic [2:0]  pattern,
  output coord_t      pos_x,
  output coord_t      pos_y
);

  typedef enum logic [2:0] {WAIT_HIGH, WAIT_LOW, ERASE, FETCH, WRITE} state_t;

  localparam int unsigned FCW  = (FRAMES_PER_STEP > 1) ? $clog2(FRAMES_PER_STEP) : 1;
  localparam coord_t      XMAX = coord_t'(GRID_W - 4);
  localparam coord_t      YMAX = coord_t'(GRID_H - 4);

  state_t         state;
  logic [1:0]     row, col;
  logic [FCW-1:0] frame_cnt;
  coord_t         tx, ty;    // target position, moved by the keys
  logic           step_due;

  // target position
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx <= X0;
      ty <= Y0;
    end else if (move) begin
      unique case (dir)
        DIR_UP:    if (ty != '0)  ty <= ty - 1'b1;
        DIR_DOWN:  if (ty != YMAX) ty <= ty + 1'b1;
        DIR_LEFT:  if (tx != '0)  tx <= tx - 1'b1;
        DIR_RIGHT: if (tx != XMAX) tx <= tx + 1'b1;
      endcase
    end
  end

  assign step_due = (frame_cnt == FCW'(FRAMES_PER_STEP - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= WAIT_HIGH;
      row       <= '0;
      col       <= '0;
      pattern   <= 3'd7;   // the first step shows pattern 0
      frame_cnt <= FCW'(FRAMES_PER_STEP - 1);
      pos_x     <= X0;
      pos_y     <= Y0;
    end else begin
      unique case (state)
        WAIT_HIGH: if (vert_sync) state <= WAIT_LOW;
        WAIT_LOW:  if (!vert_sync) begin
                     frame_cnt <= step_due ? '0 : frame_cnt + 1'b1;
                     if (step_due) pattern <= pattern + 3'd1;
                     row <= '0;
                     col <= '0;
                     if (tx != pos_x || ty != pos_y) state <= ERASE;
                     else if (step_due)              state <= FETCH;
                     else                            state <= WAIT_HIGH;
                   end
        ERASE:     begin
                     col <= col + 2'd1;
                     if (col == 2'd3) begin
                       row <= row + 2'd1;
                       if (row == 2'd3) begin
                         pos_x <= tx;
                         pos_y <= ty;
                         state <= FETCH;
                       end
                     end
                   end
        FETCH:     begin
                     col   <= '0;
                     state <= WRITE;
                   end
        WRITE:     begin
                     col <= col + 2'd1;
                     if (col == 2'd3) begin
                       row <= row + 2'd1;
                       state <= (row == 2'd3) ? WAIT_HIGH : FETCH;
                     end
                   end
        default:   state <= WAIT_HIGH;
      endcase
    end
  end

  always_comb begin
    rom_addr = {pattern, row};
    wr.we    = (state == ERASE) || (state == WRITE);
    wr.addr  = {coord_t'(pos_y + coord_t'(row)), coord_t'(pos_x + coord_t'(col))};
    wr.data  = (state == ERASE) ? BG_COLOR : rom_data[3*col +: 3];
  end

  // Rule of the shared video-RAM port: the drawing side may only write while
  // the vertical sync pulse gives it the RAM.
  a_write_in_sync_pulse: assert property (@(posedge clk) disable iff (!rst_n) wr.we |-> !vert_sync)
    else $error("video-RAM write outside the vertical sync pulse");

endmodule
