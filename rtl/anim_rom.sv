// anim_rom - pattern ROM for the video-RAM animation.
//
// Holds 8 animation patterns of 4x4 pixels. Each word is one row of one
// pattern, so pattern p, row r is at address {p, r} (p*4 + r) and the ROM has
// 32 words. A word holds four 3-bit pixels, column c in bits [3c+2:3c], each
// {red, green, blue}.
//
// Contents: pixel (r, c) of pattern p has colour (r + c + p) mod 8, so each
// pattern shows diagonal colour stripes and stepping through the patterns
// makes the stripes run diagonally across the 4x4 block. The contents are
// computed from that formula rather than stored as a table.
//
// Timing: synchronous read; data is registered and appears one clock after
// the address. Pattern count, size and row-per-word layout follow the
// published design; the pixel colours and the bit layout are this design's
// own, since the original pattern data is not given.
module anim_rom
  import vga_pkg::*;
(
  input  logic        clk,
  input  logic [4:0]  addr,   // {pattern[2:0], row[1:0]}
  output logic [11:0] data    // {pixel3, pixel2, pixel1, pixel0}
);

  function automatic logic [11:0] pattern_row(logic [4:0] a);
    logic [11:0] w;
    for (int c = 0; c < 4; c++)
      w[3*c +: 3] = color_t'(a[1:0] + 3'(c) + a[4:2]);
    return w;
  endfunction

  always_ff @(posedge clk) data <= pattern_row(addr);

endmodule
