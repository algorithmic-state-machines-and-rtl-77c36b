// tb_vram_addr_xlat - checks the scan position to video-RAM address mapping.
//
// For every visible row and a spread of columns, the expected address is the
// cell row (row / 32) times 32 plus the cell column (column / 32), worked out
// with integer division rather than bit slicing.
module tb_vram_addr_xlat;
  timeunit 1ns; timeprecision 1ns;

  logic [9:0] pixel_row, pixel_column;
  logic [9:0] ad1;
  int checks = 0, failures = 0;

  vram_addr_xlat dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 525; r += 3) begin
      for (int c = 0; c < 800; c += 7) begin
        pixel_row = 10'(r); pixel_column = 10'(c);
        #1;
        checks++;
        if (int'(ad1) != (r / 32) * 32 + (c / 32)) begin
          failures++;
          if (failures < 10) $display("FAIL: row %0d col %0d gave %0d", r, c, ad1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
