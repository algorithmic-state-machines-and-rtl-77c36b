// tb_hex7seg - checks all 16 digits against a table of lit segments.
//
// The expected segments are written as strings of segment letters (for
// example "bc" for 1), turned into an active-low mask with bit 0 = a.
module tb_hex7seg;
  timeunit 1ns; timeprecision 1ns;

  logic [3:0] hex;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  hex7seg dut (.*);

  localparam string LIT [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                                 "acdefg", "abc", "abcdefg", "abcdfg", "abcefg", "cdefg",
                                 "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] expect_n;
    for (int d = 0; d < 16; d++) begin
      expect_n = '1;
      for (int k = 0; k < LIT[d].len(); k++) expect_n[LIT[d][k] - "a"] = 1'b0;
      hex = 4'(d);
      #10;
      checks++;
      if (seg_n !== expect_n) begin
        failures++;
        $display("FAIL: digit %h gave %b expected %b", d, seg_n, expect_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
