// tb_scan_engine - checks the display path: sync, translator, RAM and pins.
//
// During the first vertical sync pulse the testbench writes all 300 visible
// cells through the write port, cell (x, y) getting colour (x + 2y) mod 8.
// Over the next full frame it then compares every pixel on the pins with the
// colour of the cell it lies in, checks that blanked pixels are black, and
// checks h_sync/v_sync on the pins against the 640x480 timing (low for
// columns 656..751 and lines 490..491). The pixel on the pins is tracked by
// the testbench's own counter from reset; the pins lag the scan by one
// clock. A write attempted while v_sync is high, with the beam inside a
// visible cell, must not reach the RAM. Every pixel compared counts as one
// check.
module tb_scan_engine;
  timeunit 1ns; timeprecision 1ns;
  import vga_pkg::*;

  logic clk = 0, rst_n = 0;
  vram_wr_t wr = '0;
  logic [2:0] rd_data;
  logic v_sync, red_out, green_out, blue_out, horiz_sync_out, vert_sync_out;
  int checks = 0, failures = 0, bad_pix = 0, bad_sync = 0;
  int pix = -1;

  scan_engine dut (.*);

  always #20 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel on the pins: 0 right after the first clock edge out of reset
  always @(posedge clk) if (rst_n) pix <= pix + 1;

  initial begin
    int hc, vc, x, y, p;
    logic [2:0] exp_c;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // fill the picture in the first sync pulse
    wait (!v_sync);
    for (y = 0; y < 15; y++) for (x = 0; x < 20; x++) begin
      @(negedge clk);
      wr = '{we: 1'b1, addr: {5'(y), 5'(x)}, data: 3'((x + 2 * y) % 8)};
    end
    @(negedge clk) wr = '0;
    check(!v_sync, "picture written inside the sync pulse");
    wait (v_sync);
    // a write while the frame is displayed must be ignored: issue it while
    // the beam is inside cell (3,3), on line 100 of the next frame
    wait (pix % 420000 == 800 * 100 + 100);
    @(negedge clk) wr = '{we: 1'b1, addr: {5'd3, 5'd3}, data: 3'b111};
    @(negedge clk) wr = '0;
    // one full frame, from pixel (0,0) on the pins
    wait (pix % 420000 == 0);
    for (int n = 0; n < 420000; n++) begin
      #1;
      p = pix % 420000;
      hc = p % 800; vc = p / 800;
      if (hc < 640 && vc < 480) exp_c = 3'((hc / 32 + 2 * (vc / 32)) % 8);
      else exp_c = 3'b000;
      checks++;
      if ({red_out, green_out, blue_out} != exp_c) begin
        bad_pix++;
        if (bad_pix < 5) $display("pixel %0d,%0d is %b expected %b", hc, vc, {red_out, green_out, blue_out}, exp_c);
      end
      if (horiz_sync_out != !(hc >= 656 && hc < 752)) bad_sync++;
      if (vert_sync_out != !(vc >= 490 && vc < 492)) bad_sync++;
      @(posedge clk);
    end
    failures += (bad_pix > 0) ? 1 : 0;
    if (bad_pix > 0) $display("FAIL: %0d pixels wrong", bad_pix);
    check(bad_sync == 0, $sformatf("%0d sync samples wrong", bad_sync));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
