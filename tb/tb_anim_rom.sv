// tb_anim_rom - checks all 32 words of the pattern ROM and its read latency.
//
// Expected pixel (r, c) of pattern p: colour (r + c + p) mod 8, computed with
// integer arithmetic. The address is changed right after a clock edge and
// the data is checked before and after the next edge, so a ROM that answered
// in the same clock, or two clocks late, fails.
module tb_anim_rom;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0;
  logic [4:0] addr = '0;
  logic [11:0] data;
  int checks = 0, failures = 0;

  anim_rom dut (.*);

  always #20 clk = ~clk;

  function automatic logic [11:0] expected(int p, int r);
    logic [11:0] w = '0;
    for (int c = 0; c < 4; c++) w = w | (12'((r + c + p) % 8) << (3 * c));
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); addr = 5'd31;
    @(negedge clk);
    for (int p = 0; p < 8; p++) for (int r = 0; r < 4; r++) begin
      addr = 5'(p * 4 + r);
      #1;
      checks++;
      if (data != expected(7, 3)) begin
        failures++;
        $display("FAIL: word %0d appeared without a clock", addr);
      end
      @(negedge clk);
      checks++;
      if (data != expected(p, r)) begin
        failures++;
        $display("FAIL: pattern %0d row %0d gave %h expected %h", p, r, data, expected(p, r));
      end
      addr = 5'd31;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
