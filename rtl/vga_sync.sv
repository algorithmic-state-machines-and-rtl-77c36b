// vga_sync - 640x480 VGA timing generator.
//
// Two counters run at the pixel clock: the column counter counts 0..H_TOTAL-1
// along a line and the row counter advances once per line, 0..V_TOTAL-1. The
// sync pulses are active low. pixel_column and pixel_row give the position of
// the pixel being scanned; video_on is high while that pixel is inside the
// visible 640x480 area.
//
// Interface: clk is the 25 MHz pixel clock, rst_n an active-low synchronous
// reset that restarts the scan at pixel (0,0). All outputs are decoded
// combinationally from the two counter registers, so they change one clock
// after the counters step. A line lasts 800 clocks (32 us at 25 MHz) and a
// frame 525 lines; v_sync is low for 2 lines, 64 us per frame.
//
// The block's role (drive h_sync and v_sync, and give the other circuits the
// scan position) follows the published design; porch and sync widths are the
// standard 640x480 60 Hz values, chosen here.
module vga_sync
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       h_sync,
  output logic       v_sync,
  output logic       video_on,
  output logic [9:0] pixel_row,
  output logic [9:0] pixel_column
);

  logic [9:0] h_cnt, v_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (h_cnt == 10'(H_TOTAL - 1)) begin
      h_cnt <= '0;
      v_cnt <= (v_cnt == 10'(V_TOTAL - 1)) ? '0 : v_cnt + 10'd1;
    end else begin
      h_cnt <= h_cnt + 10'd1;
    end
  end

  always_comb begin
    h_sync = !((h_cnt >= 10'(H_VISIBLE + H_FRONT)) &&
               (h_cnt <  10'(H_VISIBLE + H_FRONT + H_SYNC)));
    v_sync = !((v_cnt >= 10'(V_VISIBLE + V_FRONT)) &&
               (v_cnt <  10'(V_VISIBLE + V_FRONT + V_SYNC)));
    video_on     = (h_cnt < 10'(H_VISIBLE)) && (v_cnt < 10'(V_VISIBLE));
    pixel_column = h_cnt;
    pixel_row    = v_cnt;
  end

endmodule
