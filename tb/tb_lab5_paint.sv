// tb_lab5_paint - end-to-end test of the painting program.
//
// A PS/2 keyboard model types key sequences into the keyboard pins; the
// testbench watches the VGA pins, keeps its own pixel counter from reset
// (pins lag the scan by one clock) and grabs the centre of every cell once
// per frame. After each key release (and two frames) it compares the whole
// 20x15 grid with its own expected picture: cells painted in edit mode are
// green, the cursor cell white, the rest black. It also checks the edit_led
// pin and the sync timing. Mechanisms counted: edit mode toggles, painted
// cells, and leaving a painted cell with edit mode off (its colour must come
// back).
module tb_lab5_paint;
  timeunit 1ns; timeprecision 1ns;

  logic clk25MHz = 0, reset = 0, keyboard_clk = 1, keyboard_data = 1;
  logic red_out, green_out, blue_out, horiz_sync_out, vert_sync_out, edit_led;
  logic [6:0] display1, display2;

  int checks = 0, failures = 0, bad_sync = 0;
  int pix = -1, frames = 0;
  logic [2:0] screen [15][20];
  bit painted [15][20];
  bit edit = 0;
  int ex = 0, ey = 0, edits = 0, paints = 0, restores = 0;

  lab5_paint dut (.*);

  always #20 clk25MHz = ~clk25MHz;

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

  task automatic send(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~(^b), b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      keyboard_data = f[i];
      #25000 keyboard_clk = 0;
      #25000 keyboard_clk = 1;
    end
    #5000 keyboard_data = 1;
    #300000;
  endtask

  task automatic wait_frames(int n);
    int f0 = frames;
    wait (frames >= f0 + n);
  endtask

  task automatic check_screen(string what);
    int bad = 0;
    logic [2:0] e;
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) begin
      e = (x == ex && y == ey) ? 3'b111 : painted[y][x] ? 3'b010 : 3'b000;
      if (screen[y][x] != e) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d cells wrong", what, bad));
    check(edit_led == edit, $sformatf("%s: edit_led %0d", what, edit_led));
  endtask

  task automatic arrow(logic [7:0] code);
    bit was = painted[ey][ex];
    send(8'hE0); send(code); send(8'hE0); send(8'hF0); send(code);
    if (edit) begin painted[ey][ex] = 1; paints++; end
    else if (was) restores++;
    case (code)
      8'h75: if (ey > 0)  ey--;
      8'h72: if (ey < 14) ey++;
      8'h6B: if (ex > 0)  ex--;
      8'h74: if (ex < 19) ex++;
      default: ;
    endcase
    wait_frames(2);
    check_screen($sformatf("after key %02h", code));
  endtask

  task automatic enter();
    send(8'h5A); send(8'hF0); send(8'h5A);
    edit = !edit;
    edits++;
    wait_frames(2);
    check_screen("after Enter");
  endtask

  initial begin
    #2000ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 15; y++) for (int x = 0; x < 20; x++) painted[y][x] = 0;
    repeat (3) @(posedge clk25MHz);
    @(negedge clk25MHz) reset = 1;
    wait_frames(2);
    check_screen("after reset");
    arrow(8'h74);
    enter();
    arrow(8'h74);
    arrow(8'h72);
    enter();
    arrow(8'h6B);
    arrow(8'h75);    // onto the painted cell (1,0)
    arrow(8'h74);    // off it again: it must stay green
    arrow(8'h72);
    check(bad_sync == 0, $sformatf("%0d sync samples wrong", bad_sync));
    check(edits >= 2 && paints >= 2 && restores >= 1,
          $sformatf("edits %0d paints %0d restores %0d", edits, paints, restores));
    $display("edit toggles %0d, painted cells %0d, painted cells uncovered %0d", edits, paints, restores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
