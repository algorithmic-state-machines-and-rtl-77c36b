// vga_pkg - constants and types shared by the video-RAM display designs.
//
// The display is 640x480 pixels, scanned by a 25 MHz pixel clock. The video
// RAM holds one 3-bit colour (red, green, blue, one bit each) per 32x32-pixel
// cell, which gives a 20x15 grid of cells. A cell address is the 5-bit cell
// row followed by the 5-bit cell column, 10 bits in all, so the memory has
// 1024 words of which 300 are visible. The resolution, the 3-bit pixel, the
// 32x32 cell and the 10-bit address are the published design's; the detailed
// sync timing (porches, sync widths) is the common 640x480 60 Hz industry
// timing, whose 2-line vertical sync pulse lasts the 64 us the design relies on.
package vga_pkg;

  // Horizontal timing, in pixel clocks.
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned H_TOTAL   = H_VISIBLE + H_FRONT + H_SYNC + H_BACK; // 800

  // Vertical timing, in lines.
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned V_TOTAL   = V_VISIBLE + V_FRONT + V_SYNC + V_BACK; // 525

  // Video RAM geometry.
  localparam int unsigned CELL_SHIFT = 5;   // a cell is 2**5 = 32 pixels on a side
  localparam int unsigned GRID_W     = 20;  // 640 / 32
  localparam int unsigned GRID_H     = 15;  // 480 / 32
  localparam int unsigned COORD_W    = 5;   // bits of a cell row or column
  localparam int unsigned ADDR_W     = 2 * COORD_W; // 10
  localparam int unsigned COLOR_W    = 3;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [ADDR_W-1:0]  vaddr_t;
  typedef logic [COLOR_W-1:0] color_t;   // {red, green, blue}

  localparam color_t BLACK = 3'b000;
  localparam color_t WHITE = 3'b111;

  // One write request to the video RAM's write side.
  typedef struct packed {
    logic   we;
    vaddr_t addr;
    color_t data;
  } vram_wr_t;

  // PS/2 set-2 scan codes used by the keyboard-driven controllers.
  localparam logic [7:0] KEY_BREAK = 8'hF0;
  localparam logic [7:0] KEY_UP    = 8'h75;
  localparam logic [7:0] KEY_DOWN  = 8'h72;
  localparam logic [7:0] KEY_LEFT  = 8'h6B;
  localparam logic [7:0] KEY_RIGHT = 8'h74;
  localparam logic [7:0] KEY_ENTER = 8'h5A;

  typedef enum logic [1:0] {DIR_UP, DIR_DOWN, DIR_LEFT, DIR_RIGHT} dir_t;

endpackage
