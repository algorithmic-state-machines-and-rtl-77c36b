// tb_paint_asm - checks the painting state machine with a short sync pattern.
//
// vert_sync is driven as a shortened frame (high 300 clocks, low 40). The
// testbench models the video RAM itself, including the read port: a word
// addressed in a clock with vert_sync low comes back on rd_data one clock
// later. It also keeps its own expected picture: painted cells green, the
// cursor white at the expected position, the rest black. After every key
// release it compares all 1024 words. Keys: arrows with edit mode off (the
// picture under the cursor must survive, including painted cells), Enter to
// enter and leave edit mode (trail of painted cells), moves into the edges,
// and a non-arrow key. No write may fall outside a sync pulse.
module tb_paint_asm;
  timeunit 1ns; timeprecision 1ns;
  import vga_pkg::*;

  logic clk = 0, rst_n = 0, vert_sync = 1;
  logic [7:0] key = 8'h00;
  color_t rd_data = '0;
  vram_wr_t wr;
  coord_t pos_x, pos_y;
  logic edit_mode;

  color_t pic [1024];
  bit painted [1024];
  bit edit = 0;
  int checks = 0, failures = 0, writes_high = 0, ex = 0, ey = 0;
  int edits = 0, paints = 0, restores = 0;

  paint_asm dut (.*);

  always #20 clk = ~clk;

  initial forever begin
    repeat (300) @(posedge clk);
    vert_sync <= 0;
    repeat (40) @(posedge clk);
    vert_sync <= 1;
  end

  // RAM model: read-before-write, read data one clock later
  always @(posedge clk) begin
    if (!vert_sync) rd_data <= pic[wr.addr];
    if (rst_n && wr.we) begin
      if (vert_sync) writes_high++;
      pic[wr.addr] <= wr.data;
    end
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
    int bad = 0;
    color_t e;
    for (int a = 0; a < 1024; a++) begin
      if (a == ey * 32 + ex) e = WHITE;
      else if (painted[a]) e = 3'b010;
      else e = BLACK;
      if (pic[a] != e) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d cells wrong (cursor %0d,%0d)", what, bad, ex, ey));
    check(edit_mode == edit, $sformatf("%s: edit mode %0d", what, edit_mode));
  endtask

  task automatic press(logic [7:0] code, bit extended);
    if (extended) type_key(8'hE0);
    type_key(code);
    if (extended) type_key(8'hE0);
    type_key(8'hF0); type_key(code);
    repeat (700) @(posedge clk);
  endtask

  task automatic arrow(logic [7:0] code);
    int old = ey * 32 + ex;
    bit was_painted = painted[old];
    press(code, 1);
    if (edit) begin painted[old] = 1; paints++; end
    else if (was_painted) restores++;
    case (code)
      KEY_UP:    if (ey > 0)  ey--;
      KEY_DOWN:  if (ey < 14) ey++;
      KEY_LEFT:  if (ex > 0)  ex--;
      KEY_RIGHT: if (ex < 19) ex++;
      default: ;
    endcase
    check_picture($sformatf("after key %02h", code));
  endtask

  task automatic enter();
    press(KEY_ENTER, 0);
    edit = !edit;
    edits++;
    check_picture("after Enter");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] codes [4] = '{KEY_UP, KEY_DOWN, KEY_LEFT, KEY_RIGHT};
    for (int a = 0; a < 1024; a++) begin pic[a] = BLACK; painted[a] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (450) @(posedge clk);
    check_picture("after reset");
    arrow(KEY_RIGHT);
    enter();
    arrow(KEY_RIGHT);
    arrow(KEY_DOWN);
    arrow(KEY_DOWN);
    enter();
    arrow(KEY_LEFT);
    arrow(KEY_UP);
    arrow(KEY_UP);        // onto a painted cell
    arrow(KEY_UP);        // leaving it: its colour is put back
    arrow(KEY_RIGHT);
    arrow(KEY_DOWN);
    press(8'h1C, 0);      // A: ignored
    check_picture("after A");
    enter();
    for (int i = 0; i < 6; i++) arrow(KEY_LEFT);   // paints into the left edge
    enter();
    for (int i = 0; i < 40; i++) arrow(codes[$urandom_range(0, 3)]);
    check(writes_high == 0, $sformatf("%0d writes while vert_sync high", writes_high));
    check(paints > 0 && restores > 0 && edits >= 2, $sformatf("paints %0d restores %0d edits %0d", paints, restores, edits));
    $display("paints %0d, restores of a painted cell %0d, edit toggles %0d", paints, restores, edits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
