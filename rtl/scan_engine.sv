// scan_engine - VGA scanning engine wrapped around the video RAM.
//
// This is the display side of the video-RAM organisation: the sync generator
// scans the screen, the translator turns the scan position into a video-RAM
// address (ad1), and the RAM word read there is sent to the RGB pins. A
// drawing circuit never looks at the sync timing; it only hands in write
// requests (ad2, din2) through the wr port.
//
// The RAM has one address port. A multiplexer gives it to the drawing circuit
// while v_sync is low (the 64 us vertical sync pulse, when nothing is
// displayed) and to the translator the rest of the time. Write requests are
// only honoured while v_sync is low; the drawing state machines are built to
// issue them only then.
//
// Timing: the RAM read takes one clock, so h_sync, v_sync and the blanking
// signal are delayed one clock too and all five pins change together, one
// clock after the sync counters. v_sync (undelayed) is also given out to the
// drawing circuit. Interface: clk 25 MHz pixel clock, rst_n active-low
// synchronous reset.
//
// The organisation (Vga_sync, translator, dual-port VRAM, painting circuit)
// and the address multiplexing on one RAM port follow the published design;
// the choice of v_sync as the multiplexer select and the one-clock output
// alignment are this design's own.
module scan_engine
  import vga_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  vram_wr_t wr,
  output logic     v_sync,
  output color_t   rd_data,
  output logic     red_out,
  output logic     green_out,
  output logic     blue_out,
  output logic     horiz_sync_out,
  output logic     vert_sync_out
);

  logic       h_sync, video_on;
  logic [9:0] pixel_row, pixel_column;
  vaddr_t     ad1, address;
  logic       r, g, b;
  logic       video_on_d;

  vga_sync u_sync (
    .clk, .rst_n, .h_sync, .v_sync, .video_on, .pixel_row, .pixel_column
  );

  vram_addr_xlat u_xlat (.pixel_row, .pixel_column, .ad1);

  // Port 1 (scan, read) while v_sync is high, port 2 (draw, write) while low.
  assign address = v_sync ? ad1 : wr.addr;

  vgamem u_vram (
    .clock   (clk),
    .we      (wr.we && !v_sync),
    .address (address),
    .redin   (wr.data[2]),
    .greenin (wr.data[1]),
    .bluein  (wr.data[0]),
    .redout  (r),
    .greenout(g),
    .blueout (b)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      video_on_d     <= 1'b0;
      horiz_sync_out <= 1'b1;
      vert_sync_out  <= 1'b1;
    end else begin
      video_on_d     <= video_on;
      horiz_sync_out <= h_sync;
      vert_sync_out  <= v_sync;
    end
  end

  // Raw RAM word, for a drawing circuit that reads back what is under it: the
  // word at wr.addr presented in a clock with v_sync low, one clock later.
  assign rd_data = {r, g, b};

  assign red_out   = r && video_on_d;
  assign green_out = g && video_on_d;
  assign blue_out  = b && video_on_d;

endmodule
