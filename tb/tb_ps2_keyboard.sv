// tb_ps2_keyboard - checks the PS/2 receiver with a keyboard model.
//
// The keyboard model drives 11-bit frames (start, 8 data bits LSB first, odd
// parity, stop) with a 25 us half period on keyboard_clk, data changing while
// the clock is high. Checks: every good byte comes out on scan_code with one
// scan_ready pulse; a frame with wrong parity gives no pulse and leaves
// scan_code unchanged; a frame cut off after 4 bits is dropped after the
// timeout and the receiver then takes the next frame correctly.
module tb_ps2_keyboard;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0;
  logic keyboard_clk = 1, keyboard_data = 1;
  logic [7:0] scan_code;
  logic scan_ready;
  int checks = 0, failures = 0, ready_pulses = 0;

  ps2_keyboard #(.TIMEOUT(2500)) dut (.*);

  always #20 clk = ~clk;
  always @(posedge clk) if (scan_ready) ready_pulses++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send nbits bits of a frame for byte b; bad_parity flips the parity bit.
  task automatic send(logic [7:0] b, bit bad_parity = 0, int nbits = 11);
    logic [10:0] f;
    f = {1'b1, ~(^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      keyboard_data = f[i];
      #25000 keyboard_clk = 0;
      #25000 keyboard_clk = 1;
    end
    #5000 keyboard_data = 1;
    #100000;
  endtask

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int p;
    repeat (4) @(posedge clk);
    rst_n = 1;
    #10000;
    foreach (b_list[i]) begin
      p = ready_pulses;
      send(b_list[i]);
      check(scan_code == b_list[i], $sformatf("byte %02h received as %02h", b_list[i], scan_code));
      check(ready_pulses == p + 1, "one scan_ready pulse per byte");
    end
    for (int n = 0; n < 20; n++) begin
      b = 8'($urandom);
      send(b);
      check(scan_code == b, $sformatf("random byte %02h received as %02h", b, scan_code));
    end
    // parity error: ignored
    p = ready_pulses;
    b = scan_code;
    send(8'h3C, 1);
    check(ready_pulses == p && scan_code == b, "bad parity frame rejected");
    // truncated frame then a good one
    send(8'h55, 0, 4);
    #1ms;
    send(8'h6B);
    check(scan_code == 8'h6B, $sformatf("after truncated frame got %02h", scan_code));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] b_list [8] = '{8'hE0, 8'hF0, 8'h75, 8'h72, 8'h6B, 8'h74, 8'h00, 8'hFF};
endmodule
