// tb_vgamem - checks the 1024 x 3 video RAM against an array model.
//
// Clears nothing by hand: first checks that the RAM starts black, then
// performs random writes and reads and compares each read, one clock after
// its address, with the model. Also checks that a write returns the old word
// on that clock (read-before-write) and that every address holds its own word.
module tb_vgamem;
  timeunit 1ns; timeprecision 1ns;

  logic clock = 0, we = 0;
  logic [9:0] address = '0;
  logic redin = 0, greenin = 0, bluein = 0;
  logic redout, greenout, blueout;
  logic [2:0] model [1024];
  int checks = 0, failures = 0;

  vgamem dut (.*);

  always #20 clock = ~clock;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] d;
    for (int i = 0; i < 1024; i++) model[i] = 3'b000;
    // power-up contents
    for (int i = 0; i < 1024; i += 13) begin
      @(negedge clock); address = 10'(i); we = 0;
      @(negedge clock);
      check({redout, greenout, blueout} == 3'b000, $sformatf("initial word %0d", i));
    end
    // fill every address with its own pattern
    for (int i = 0; i < 1024; i++) begin
      @(negedge clock);
      address = 10'(i); we = 1; {redin, greenin, bluein} = 3'(i * 5 + 1);
      model[i] = 3'(i * 5 + 1);
    end
    @(negedge clock); we = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clock); address = 10'(i);
      @(negedge clock);
      check({redout, greenout, blueout} == model[i], $sformatf("word %0d", i));
    end
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      @(negedge clock);
      address = 10'($urandom_range(0, 1023));
      we = ($urandom_range(0, 1) == 1);
      d = 3'($urandom);
      {redin, greenin, bluein} = d;
      @(negedge clock);
      check({redout, greenout, blueout} == model[address], $sformatf("random read %0d", address));
      if (we) model[address] = d;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
