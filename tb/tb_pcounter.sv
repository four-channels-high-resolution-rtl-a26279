// tb_pcounter: random count-enable and clear against a reference model, plus
// a run of the full 8-bit range to check the wrap. Uses WIDTH = 8 so the wrap
// is reached quickly.
module tb_pcounter;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic ce, sclr;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  pcounter #(.WIDTH(W)) dut (.clk(clk), .ce(ce), .sclr(sclr), .q(q));

  always #5ns clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic s);
    ce = c; sclr = s;
    @(posedge clk);
    if (s) model = '0; else if (c) model = model + 1'b1;
    #1ns;
    checks++;
    if (q !== model) begin
      failures++;
      $display("mismatch: ce=%b sclr=%b q=%0d expected %0d", c, s, q, model);
    end
  endtask

  initial begin
    ce = 0; sclr = 0; model = '0;
    step(1'b0, 1'b1);                                // clear
    step(1'b1, 1'b1);                                // clear wins over enable
    for (int i = 0; i < 300; i++) step(1'b1, 1'b0);  // wraps past 255
    for (int i = 0; i < 400; i++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 9) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
