// tb_edge_detector: drives both a falling-edge and a rising-edge detector with
// a random bit stream and checks each pulse against the previous/current
// sample of the stream.
module tb_edge_detector;
  import fc_pkg::*;
  logic clk = 1'b0;
  logic d = 1'b0;
  logic fall, rise;
  logic prev;
  int checks = 0, failures = 0, n_fall = 0, n_rise = 0;

  edge_detector #(.KIND(EDGE_FALLING)) dut_fall (.clk(clk), .d(d), .edge_o(fall));
  edge_detector #(.KIND(EDGE_RISING))  dut_rise (.clk(clk), .d(d), .edge_o(rise));

  always #5ns clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    prev = d;
    for (int i = 0; i < 500; i++) begin
      #1ns d = 1'($urandom_range(0, 1));
      #1ns;
      checks += 2;
      if (fall !== (prev & ~d)) begin failures++; $display("fall wrong at %0d", i); end
      if (rise !== (~prev & d)) begin failures++; $display("rise wrong at %0d", i); end
      n_fall += int'(fall);
      n_rise += int'(rise);
      @(posedge clk);
      prev = d;
    end
    checks++;
    if (n_fall == 0 || n_rise == 0) begin failures++; $display("no edges seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
