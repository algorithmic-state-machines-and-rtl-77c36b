// vram_addr_xlat - timing to video-RAM address translator.
//
// Every video-RAM word stands for a 32x32-pixel cell of the screen. The
// translator drops the low five bits of the scan position and concatenates
// what is left: address = pixel_row[9:5] & pixel_column[9:5]. Along a line
// the address therefore steps once every 32 pixels, and the same run of 20
// addresses repeats for 32 lines before moving to the next cell row.
//
// Interface: purely combinational, no clock. The cell size comes from
// vga_pkg::CELL_SHIFT (5, the published design's value); the bit slicing is
// exactly the published one.
module vram_addr_xlat
  import vga_pkg::*;
(
  input  logic [9:0] pixel_row,
  input  logic [9:0] pixel_column,
  output vaddr_t     ad1
);

  always_comb
    ad1 = {pixel_row[CELL_SHIFT +: COORD_W], pixel_column[CELL_SHIFT +: COORD_W]};

endmodule
