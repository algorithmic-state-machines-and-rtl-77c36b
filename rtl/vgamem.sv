// vgamem - the video RAM: 2**10 words of 3 bits in on-chip block memory.
//
// One pixel colour {red, green, blue} per word. The memory has a single
// address port, as the published design has: the scanning engine (read) and
// the drawing state machine (write) share it through a multiplexer outside
// this module, which emulates the two ports of a true video RAM.
//
// Interface and timing: everything is synchronous to clock. When we is high
// at a rising edge, {redin, greenin, bluein} is stored at address. The word
// at address is registered into {redout, greenout, blueout} on every rising
// edge, so read data appears one clock after the address (a registered-
// address block RAM; on a write the old contents are read). The memory
// starts cleared to black, as an FPGA block RAM does at configuration.
//
// Size (1024 x 3) and the nine ports follow the published design. The choice
// of a registered read, and of a registered write on the same clock as the
// rest of the system, is this design's own.
module vgamem
  import vga_pkg::*;
#(
  parameter int unsigned WIDTHAD = ADDR_W  // address bits: 2**10 words
) (
  input  logic               clock,
  input  logic               we,
  input  logic [WIDTHAD-1:0] address,
  input  logic               redin,
  input  logic               greenin,
  input  logic               bluein,
  output logic               redout,
  output logic               greenout,
  output logic               blueout
);

  localparam int unsigned DEPTH = 2 ** WIDTHAD;

  color_t mem [DEPTH];
  color_t q;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clock) begin
    if (we) mem[address] <= {redin, greenin, bluein};
    q <= mem[address];
  end

  assign {redout, greenout, blueout} = q;

endmodule
