// anim_asm - state machine that animates a 4x4-cell block in the video RAM.
//
// Once every FRAMES_PER_STEP frames, at the start of the vertical sync pulse,
// the machine copies the current pattern from the pattern ROM into the 4x4
// group of video-RAM cells whose top-left cell is (POS_X, POS_Y), then moves
// on to the next of the 8 patterns, wrapping after the last. The copy reads
// one ROM word (one row of four pixels) and writes its four pixels into four
// RAM cells, row after row: 4 x (1 + 4) = 20 clocks, well inside the 1600-
// clock sync pulse.
//
// States:
//   WAIT_HIGH  wait for vert_sync = 1 (the frame is being displayed)
//   WAIT_LOW   wait for vert_sync = 0 (a new sync pulse); count the frame and
//              start a copy when the count is reached
//   FETCH      present {pattern, row} to the ROM
//   WRITE      write pixel col of the ROM word at cell (POS_X+col, POS_Y+row)
//
// Interface: clk 25 MHz, rst_n active-low synchronous reset (pattern 0,
// first copy at the first sync pulse). rom_addr/rom_data connect to anim_rom
// (one-clock read latency). wr is the video-RAM write request; wr.we is high
// for one clock per pixel, only during the sync pulse. pattern is the pattern
// to be drawn next; frames counts the sync pulses seen, copies counts copies.
//
// The published design gives the function (a ROM of 8 4x4 patterns, drawn
// into the video RAM, without keyboard); the states, the block position and
// the animation rate are this design's own.
module anim_asm
  import vga_pkg::*;
#(
  parameter int unsigned FRAMES_PER_STEP = 6,     // 60 Hz / 6 = 10 patterns per second
  parameter coord_t      POS_X           = 5'd8,
  parameter coord_t      POS_Y           = 5'd6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vert_sync,
  output logic [4:0]  rom_addr,
  input  logic [11:0] rom_data,
  output vram_wr_t    wr,
  output logic [2:0]  pattern
);

  typedef enum logic [1:0] {WAIT_HIGH, WAIT_LOW, FETCH, WRITE} state_t;

  localparam int unsigned FCW = (FRAMES_PER_STEP > 1) ? $clog2(FRAMES_PER_STEP) : 1;

  state_t         state;
  logic [1:0]     row, col;
  logic [FCW-1:0] frame_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= WAIT_HIGH;
      row       <= '0;
      col       <= '0;
      pattern   <= '0;
      frame_cnt <= FCW'(FRAMES_PER_STEP - 1);
    end else begin
      unique case (state)
        WAIT_HIGH: if (vert_sync) state <= WAIT_LOW;
        WAIT_LOW:  if (!vert_sync) begin
                     if (frame_cnt == FCW'(FRAMES_PER_STEP - 1)) begin
                       frame_cnt <= '0;
                       row       <= '0;
                       state     <= FETCH;
                     end else begin
                       frame_cnt <= frame_cnt + 1'b1;
                       state     <= WAIT_HIGH;
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
                       if (row == 2'd3) begin
                         pattern <= pattern + 3'd1;
                         state   <= WAIT_HIGH;
                       end else begin
                         state <= FETCH;
                       end
                     end
                   end
      endcase
    end
  end

  always_comb begin
    rom_addr = {pattern, row};
    wr.we    = (state == WRITE);
    wr.addr  = {coord_t'(POS_Y + coord_t'(row)), coord_t'(POS_X + coord_t'(col))};
    wr.data  = rom_data[3*col +: 3];
  end

  // Rule of the shared video-RAM port: the drawing side may only write while
  // the vertical sync pulse gives it the RAM.
  a_write_in_sync_pulse: assert property (@(posedge clk) disable iff (!rst_n) wr.we |-> !vert_sync)
    else $error("video-RAM write outside the vertical sync pulse");

endmodule
