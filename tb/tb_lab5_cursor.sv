// tb_lab5_cursor - end-to-end test of the keyboard-driven cursor system.
//
// A PS/2 keyboard model types real key sequences (make and break codes,
// 11-bit frames, 25 us half clock period) into the keyboard pins, and the
// testbench watches the VGA pins only. It keeps its own pixel counter from
// reset (the pins lag the scan by one clock) and grabs the colour at the
// centre of every 32x32 cell once per frame. Checks: after reset the screen
// is black with a white cursor at cell (0,0); each arrow release moves the
// cursor one cell (clamped at the edges) and leaves exactly one white cell;
// a key with a bad parity bit and a non-arrow key change nothing; the
// seven-segment displays show the last scan code; the sync pins follow the
// 640x480 timing.
module tb_lab5_cursor;
  timeunit 1ns; timeprecision 1ns;

  logic clk25MHz = 0, reset = 0;
  logic keyboard_clk = 1, keyboard_data = 1;
  logic red_out, green_out, blue_out, horiz_sync_out, vert_sync_out;
  logic [6:0] display1, display2;

  int checks = 0, failures = 0, bad_sync = 0;
  int pix = -1, frames = 0;
  logic [2:0] screen [15][20];
  int ex = 0, ey = 0;
  int moves[4] = '{0, 0, 0, 0}, clamps = 0;

  lab5_cursor dut (.*);

  always #20 clk25MHz = ~clk25MHz;

  // pixel on the pins and the cell-centre grab
  always @(posedge clk25MHz) if (reset) pix <= pix + 1;
  always @(negedge clk25MHz) if (pix >= 0) begin
    automatic int p = pix % 420000;
    automatic int hc = p % 800, vc = p / 800;
    if (hc < 640 && vc < 480 && hc % 32 == 16 && vc % 32 == 16)
      screen[vc / 32][hc / 32] = {red_out, green_out, blue_out};
    if (horiz_sync_out != !(hc >= 656 && hc < 752)) bad_sync++;
    if (vert_sync_out != !(vc >= 490 && vc < 492)) bad_sync++;
    if (p == 419999) frames++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(logic [7:0] b, bit bad_parity = 0);
    logic [10:0] f;
    f = {1'b1, ~(^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      keyboard_data = f[i];
      #25000 keyboard_clk = 0;
      #25000 keyboard_clk = 1;
    end
    #5000 keyboard_data = 1;
    #300000;
  endtask

  // segments lit for a hex digit, active low, bit 0 = a
  function automatic logic [6:0] seg(int d);
    case (d)
      7:  return ~7'b0000111;
      4:  return ~7'b1100110;
      2:  return ~7'b1011011;
      5:  return ~7'b1101101;
      6:  return ~7'b1111101;
      11: return ~7'b1111100;
      1:  return ~7'b0000110;
      12: return ~7'b0111001;
      default: return 7'bx;
    endcase
  endfunction

  task automatic wait_frames(int n);
    int f0 = frames;
    wait (frames >= f0 + n);
  endtask

  task automatic check_screen(string what);
    int whites = 0, others = 0;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) begin
      if (screen[y][x] == 3'b111) whites++;
      else if (screen[y][x] != 3'b000) others++;
    end
    check(whites == 1 && others == 0, $sformatf("%s: %0d white, %0d other cells", what, whites, others));
    check(screen[ey][ex] == 3'b111, $sformatf("%s: cursor not at (%0d,%0d)", what, ex, ey));
  endtask

  task automatic arrow(logic [7:0] code);
    int ox = ex, oy = ey;
    send(8'hE0); send(code); send(8'hE0); send(8'hF0); send(code);
    case (code)
      8'h75: begin if (ey > 0)  ey--; moves[0]++; end
      8'h72: begin if (ey < 14) ey++; moves[1]++; end
      8'h6B: begin if (ex > 0)  ex--; moves[2]++; end
      8'h74: begin if (ex < 19) ex++; moves[3]++; end
      default: ;
    endcase
    if (ox == ex && oy == ey) clamps++;
    wait_frames(2);
    check_screen($sformatf("after key %02h", code));
    check(display1 == seg(int'(code[7:4])) && display2 == seg(int'(code[3:0])),
          $sformatf("displays %b %b for %02h", display1, display2, code));
  endtask

  initial begin
    #1000ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk25MHz);
    @(negedge clk25MHz) reset = 1;
    wait_frames(2);
    check_screen("after reset");
    arrow(8'h74);   // right
    arrow(8'h72);   // down
    arrow(8'h72);
    arrow(8'h6B);   // left
    arrow(8'h6B);   // left at the edge: clamped
    arrow(8'h75);   // up
    arrow(8'h75);   // up at the edge: clamped
    arrow(8'h74);
    // bad parity on the last byte: the release is lost, nothing moves
    send(8'hE0); send(8'h74); send(8'hE0); send(8'hF0); send(8'h74, 1);
    wait_frames(2);
    check_screen("after a bad-parity byte");
    // a non-arrow key: A (1C)
    send(8'h1C); send(8'hF0); send(8'h1C);
    wait_frames(2);
    check_screen("after a non-arrow key");
    check(display1 == seg(1) && display2 == seg(12), "displays after 1C");
    arrow(8'h72);
    check(bad_sync == 0, $sformatf("%0d sync samples wrong", bad_sync));
    for (int i = 0; i < 4; i++) check(moves[i] > 0, $sformatf("direction %0d never used", i));
    check(clamps > 0, "edge clamp never exercised");
    $display("moves up/down/left/right %0d/%0d/%0d/%0d, clamped %0d", moves[0], moves[1], moves[2], moves[3], clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
