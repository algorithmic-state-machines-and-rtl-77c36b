// tb_arrow_decoder - checks arrow-key recognition on a scan-code byte stream.
//
// Feeds random streams of make codes, break sequences (E0 F0 xx for the
// arrows, F0 xx for other keys) and stray bytes, one byte per scan_ready
// pulse, and compares every move pulse and its direction with a reference
// decoder written here: a move is due exactly when an arrow code follows
// F0. Also checks that a byte without scan_ready does nothing.
module tb_arrow_decoder;
  timeunit 1ns; timeprecision 1ns;
  import vga_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] scan_code = '0;
  logic scan_ready = 0;
  logic move;
  dir_t dir;
  int checks = 0, failures = 0, moves_expected = 0, moves_seen = 0;

  arrow_decoder dut (.*);

  always #20 clk = ~clk;

  always @(posedge clk) if (move) moves_seen++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] prev = 8'h00;

  task automatic byte_in(logic [7:0] b);
    int exp_dir;
    bit exp_move;
    exp_move = (prev == 8'hF0) && (b == 8'h75 || b == 8'h72 || b == 8'h6B || b == 8'h74);
    exp_dir = (b == 8'h75) ? 0 : (b == 8'h72) ? 1 : (b == 8'h6B) ? 2 : 3;
    @(negedge clk); scan_code = b; scan_ready = 1;
    @(negedge clk); scan_ready = 0;
    check(move == exp_move, $sformatf("byte %02h after %02h: move %0d", b, prev, move));
    if (exp_move) begin
      moves_expected++;
      check(int'(dir) == exp_dir, $sformatf("byte %02h: dir %0d expected %0d", b, dir, exp_dir));
    end
    @(negedge clk);
    check(!move, "move longer than one clock");
    // a changing byte without scan_ready must be ignored
    scan_code = 8'hF0;
    repeat (3) @(negedge clk);
    prev = b;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] arrows [4] = '{8'h75, 8'h72, 8'h6B, 8'h74};
    logic [7:0] others [5] = '{8'h1C, 8'h5A, 8'h29, 8'hE0, 8'h00};
    logic [7:0] k;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      case ($urandom_range(0, 3))
        0: begin k = arrows[$urandom_range(0, 3)]; byte_in(8'hE0); byte_in(k); byte_in(8'hE0); byte_in(8'hF0); byte_in(k); end
        1: begin k = others[$urandom_range(0, 4)]; byte_in(k); byte_in(8'hF0); byte_in(k); end
        2: byte_in(arrows[$urandom_range(0, 3)]);   // a make code alone
        default: byte_in(8'($urandom));
      endcase
    end
    check(moves_seen == moves_expected && moves_expected > 0,
          $sformatf("%0d moves seen, %0d expected", moves_seen, moves_expected));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
