// tb_cursor_asm - checks the cursor state machine with a short sync pattern.
//
// vert_sync is driven as a shortened frame (high 300 clocks, low 40 clocks).
// The testbench keeps its own picture of the video RAM from the write
// requests and its own cursor position, moved by the keys it types with
// clamping at the 20x15 grid edges. Checks: the cursor is drawn after reset;
// each arrow-key release (E0 F0 code) erases the old cell and draws the new
// one, both inside one sync pulse, with exactly two writes; non-arrow keys and
// make codes change nothing; no write happens while vert_sync is high; the
// picture always holds exactly one cursor cell at the expected place.
module tb_cursor_asm;
  timeunit 1ns; timeprecision 1ns;
  import vga_pkg::*;

  logic clk = 0, rst_n = 0, vert_sync = 1;
  logic [7:0] key = 8'h00;
  vram_wr_t wr;
  coord_t pos_x, pos_y;

  color_t pic [1024];
  int checks = 0, failures = 0;
  int writes = 0, writes_high = 0, ex = 0, ey = 0, frame = 0;
  int write_frame [$];

  cursor_asm dut (.*);

  always #20 clk = ~clk;

  // shortened frame: 300 clocks high, 40 clocks low
  initial forever begin
    repeat (300) @(posedge clk);
    vert_sync <= 0;
    frame++;
    repeat (40) @(posedge clk);
    vert_sync <= 1;
  end

  always @(posedge clk) if (rst_n && wr.we) begin
    writes++;
    write_frame.push_back(frame);
    if (vert_sync) writes_high++;
    pic[wr.addr] = wr.data;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic type_key(logic [7:0] b);
    key <= b;
    repeat (37) @(posedge clk);
  endtask

  task automatic check_picture(string what);
    int whites = 0;
    for (int a = 0; a < 1024; a++) if (pic[a] == WHITE) whites++;
    check(whites == 1, $sformatf("%s: %0d cursor cells", what, whites));
    check(pic[ey * 32 + ex] == WHITE, $sformatf("%s: cursor not at (%0d,%0d)", what, ex, ey));
    check(pos_x == coord_t'(ex) && pos_y == coord_t'(ey),
          $sformatf("%s: position (%0d,%0d) expected (%0d,%0d)", what, pos_x, pos_y, ex, ey));
  endtask

  // Release of an extended key: E0 F0 code (after its make code E0 code).
  task automatic arrow(logic [7:0] code);
    int w0;
    type_key(8'hE0); type_key(code);
    w0 = writes;
    type_key(8'hE0); type_key(8'hF0); type_key(code);
    repeat (700) @(posedge clk);
    case (code)
      KEY_UP:    if (ey > 0)  ey--;
      KEY_DOWN:  if (ey < 14) ey++;
      KEY_LEFT:  if (ex > 0)  ex--;
      KEY_RIGHT: if (ex < 19) ex++;
      default: ;
    endcase
    check(writes - w0 == 2, $sformatf("key %02h: %0d writes", code, writes - w0));
    check_picture($sformatf("after key %02h", code));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] codes [4] = '{KEY_UP, KEY_DOWN, KEY_LEFT, KEY_RIGHT};
    int w0;
    for (int a = 0; a < 1024; a++) pic[a] = BLACK;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // no write may happen before the first sync pulse
    repeat (250) @(posedge clk);
    check(writes == 0, "write before the first sync pulse");
    repeat (200) @(posedge clk);
    check(writes == 1, $sformatf("initial draw: %0d writes", writes));
    check_picture("after reset");
    // edges: up and left are clamped at (0,0)
    arrow(KEY_UP);
    arrow(KEY_LEFT);
    arrow(KEY_RIGHT);
    arrow(KEY_DOWN);
    // a non-arrow key (A = 1C) is ignored
    w0 = writes;
    type_key(8'h1C); type_key(8'hF0); type_key(8'h1C);
    repeat (700) @(posedge clk);
    check(writes == w0, "non-arrow key wrote");
    // F0 held: nothing happens until the next byte
    w0 = writes;
    type_key(8'hE0); type_key(8'hF0);
    repeat (1000) @(posedge clk);
    check(writes == w0, "wrote while waiting for the byte after F0");
    type_key(KEY_RIGHT);
    repeat (700) @(posedge clk);
    ex++;
    check(writes - w0 == 2, "move after long F0");
    check(write_frame[$] == write_frame[$-1], "erase and redraw in one sync pulse");
    check_picture("after long F0");
    // walk into the right and bottom edges and around
    for (int i = 0; i < 22; i++) arrow(KEY_RIGHT);
    for (int i = 0; i < 17; i++) arrow(KEY_DOWN);
    for (int i = 0; i < 60; i++) arrow(codes[$urandom_range(0, 3)]);
    check(writes_high == 0, $sformatf("%0d writes while vert_sync high", writes_high));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
