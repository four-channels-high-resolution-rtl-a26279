// tb_timegate_block: checks the gate period (TIME_GATE_TOP clocks), the
// one-clock low phase, the first rise after reset, a change of
// TIME_GATE_TOP, and that a period of 0 or 1 keeps the gate low.
module tb_timegate_block;
  import fc_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b0;
  cnt_t top;
  logic gate;
  int checks = 0, failures = 0;

  timegate_block dut (.RST(rst), .CLK(clk), .TIME_GATE_TOP(top), .TIME_GATE_SIGNAL(gate));

  always #5ns clk = ~clk;   // 100 MHz

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Samples the gate for n clocks; returns the number of high clocks and
  // the clock indices of the low clocks (first two).
  task automatic measure(input int n, output int high, output int low0, output int low1);
    int lows;
    high = 0; lows = 0; low0 = -1; low1 = -1;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1ns;
      if (gate) high++;
      else begin
        if (lows == 0) low0 = i;
        if (lows == 1) low1 = i;
        lows++;
      end
    end
  endtask

  initial begin
    int high, l0, l1;
    top = 32'd10;
    repeat (3) @(posedge clk);
    check(gate == 1'b0, "gate low in reset");
    #1ns rst = 1'b1;
    @(posedge clk); #1ns;
    check(gate == 1'b1, "gate rises one clock after reset release");
    // Period and duty: 10 clocks, 9 high and 1 low.
    measure(100, high, l0, l1);
    check(high == 90, $sformatf("10 of every 100 clocks low (high=%0d)", high));
    check(l1 - l0 == 10, $sformatf("period 10 clocks (got %0d)", l1 - l0));
    // Calibrated period, e.g. 1000 clocks.
    top = 32'd1000;
    measure(3000, high, l0, l1);
    check(l1 - l0 == 1000, $sformatf("period 1000 clocks (got %0d)", l1 - l0));
    check(high >= 2996 && high <= 2998, $sformatf("one low clock per period (high=%0d)", high));
    // Degenerate periods keep the gate low.
    top = 32'd1;
    measure(5, high, l0, l1);
    measure(20, high, l0, l1);
    check(high == 0, "TIME_GATE_TOP = 1 holds the gate low");
    top = 32'd0;
    measure(20, high, l0, l1);
    check(high == 0, "TIME_GATE_TOP = 0 holds the gate low");
    // Asynchronous reset drops the gate at once.
    top = 32'd50;
    repeat (5) @(posedge clk);
    #2ns rst = 1'b0;
    #1ns check(gate == 1'b0, "reset clears the gate asynchronously");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
