// tb_vga_sync - checks the 640x480 timing generator over two frames.
//
// Measures, independently of the generator's own counters, the period and
// low time of h_sync (800 and 96 clocks), the period and low time of v_sync
// (420000 and 1600 clocks, the latter being the 64 us at 25 MHz the video-RAM
// writers rely on), the number of visible pixels per frame (307200) and that
// pixel_row/pixel_column follow a raster scan.
module tb_vga_sync;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0;
  logic h_sync, v_sync, video_on;
  logic [9:0] pixel_row, pixel_column;
  int checks = 0, failures = 0;

  vga_sync dut (.*);

  always #20 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, h_fall_prev, h_rise, v_fall_prev, v_rise, vis, nframes, hchk;
    int exp_r, exp_c;
    logic h_prev, v_prev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0; h_fall_prev = -1; v_fall_prev = -1; vis = 0; nframes = 0; hchk = 0;
    exp_r = 0; exp_c = 1;  // the first clock after reset moves to column 1
    h_prev = 1; v_prev = 1;
    while (nframes < 3) begin
      @(posedge clk); #1;
      cyc++;
      // raster order, checked every clock on a sample of cycles
      if (cyc % 997 == 0)
        check(pixel_row == 10'(exp_r) && pixel_column == 10'(exp_c),
              $sformatf("raster position %0d,%0d expected %0d,%0d", pixel_row, pixel_column, exp_r, exp_c));
      exp_c++;
      if (exp_c == 800) begin exp_c = 0; exp_r = (exp_r == 524) ? 0 : exp_r + 1; end
      if (video_on) vis++;
      if (h_prev && !h_sync) begin
        if (h_fall_prev >= 0 && hchk < 20) begin
          check(cyc - h_fall_prev == 800, $sformatf("h period %0d", cyc - h_fall_prev));
          check(h_rise - h_fall_prev == 96, $sformatf("h low %0d", h_rise - h_fall_prev));
          hchk++;
        end
        h_fall_prev = cyc;
      end
      if (!h_prev && h_sync) h_rise = cyc;
      if (!v_prev && v_sync) begin
        v_rise = cyc;
        check(v_rise - v_fall_prev == 1600, $sformatf("v low %0d", v_rise - v_fall_prev));
      end
      if (v_prev && !v_sync) begin
        if (v_fall_prev >= 0) begin
          check(cyc - v_fall_prev == 420000, $sformatf("v period %0d", cyc - v_fall_prev));
          check(vis == 307200, $sformatf("visible pixels %0d", vis));
          hchk = 0;
        end
        vis = 0;
        v_fall_prev = cyc;
        nframes++;
      end
      h_prev = h_sync; v_prev = v_sync;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
