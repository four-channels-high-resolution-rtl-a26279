// tb_reciprocal_block: one channel with free-running reference and input
// clocks of unrelated periods and a time gate driven by the testbench (high
// for a few microseconds, low for 10 ns as in the real design). For each
// result it checks
//   * N_in against the number of input periods that fit the gate period,
//     less the few periods lost while one measurement hands over to the next,
//   * N_ref against N_in input periods measured in reference periods (+-1),
//     which is the reciprocal-counting property f = N_in / N_ref * f_ref,
// and it checks that each gate period yields exactly one new result. Input
// periods from 1 MHz to 37 MHz are used; at those rates the 10 ns low pulse of
// the gate usually falls between two input edges.
module tb_reciprocal_block;
  import fc_pkg::*;
  localparam int unsigned REF_HALF_PS = 1667;       // ~300 MHz
  logic ref_clk = 1'b0;
  logic ch_clk  = 1'b0;
  logic rst = 1'b0;
  logic gate = 1'b0;
  cnt_t ch_cnt, ref_cnt;
  int   ch_half_ps = 50_000;
  int checks = 0, failures = 0, results = 0;

  reciprocal_block dut (
    .CH_CLK(ch_clk), .REF_CLK(ref_clk), .RST(rst), .TIME_GATE_SIGNAL(gate),
    .CH_COUNTER(ch_cnt), .REF_COUNTER(ref_cnt)
  );

  always #(REF_HALF_PS * 1ps) ref_clk = ~ref_clk;
  always #(ch_half_ps * 1ps)  ch_clk  = ~ch_clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Free-running time gate: gate_high_ns high, then a 10 ns low pulse.
  int gate_high_ns = 3000;
  bit gate_run = 1'b0;
  bit gate_stop = 1'b0;
  int n_seen = 0;                 // results since the last change of rate

  initial begin
    wait (gate_run);
    while (!gate_stop) begin
      gate = 1'b1;
      #(gate_high_ns * 1ns);
      gate = 1'b0;
      #10ns;
    end
    gate = 1'b0;
  end

  // Checks every new result against the clock periods in force.
  always @(ch_cnt or ref_cnt) begin
    longint gate_ps, ch_ps, ref_ps, exp_ref;
    #1ns;
    if (rst) begin
      results++;
      n_seen++;
      ch_ps   = 2 * longint'(ch_half_ps);
      ref_ps  = 2 * REF_HALF_PS;
      gate_ps = longint'(gate_high_ns + 10) * 1000;
      exp_ref = longint'(ch_cnt) * ch_ps / ref_ps;
      // The first result after a change of rate spans both rates.
      if (n_seen > 1)
        check(longint'(ref_cnt) >= exp_ref - 1 && longint'(ref_cnt) <= exp_ref + 1,
              $sformatf("N_ref %0d, expected %0d +-1 (N_in %0d)", ref_cnt, exp_ref, ch_cnt));
      // A measurement is the gate period less the hand-over between
      // measurements, which costs up to about six input periods.
      if (n_seen > 2)
        check(longint'(ch_cnt) >= gate_ps / ch_ps - 7 && longint'(ch_cnt) <= gate_ps / ch_ps + 1,
              $sformatf("N_in %0d for gate %0d ps / input %0d ps", ch_cnt, gate_ps, ch_ps));
    end
  end

  // Runs n gate periods at one input period and gate length.
  task automatic run(input int half_ps, input int high_ns, input int n);
    ch_half_ps   = half_ps;
    gate_high_ns = high_ns;
    n_seen       = 0;
    #((n + 2) * (high_ns + 10) * 1ns);
  endtask

  initial begin
    #20ns;
    check(ch_cnt == '0 && ref_cnt == '0, "results zero in reset");
    rst = 1'b1;
    #50ns;
    gate_run = 1'b1;
    run(50_000, 3000, 3);     // 10 MHz
    run(49_999, 3000, 3);     // 10.0002 MHz
    run(13_513, 2000, 3);     // 37 MHz
    run(500_000, 9000, 2);    // 1 MHz, gate low pulse far shorter than a period
    run(51_234, 4321, 3);
    check(results >= 18, $sformatf("one new result per gate period (%0d)", results));
    // Gate held low: the current measurement ends and no new one starts.
    gate_stop = 1'b1;
    #12us;
    last_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic last_check();
    cnt_t c0;
    c0 = ch_cnt;
    #3us;
    check(ch_cnt == c0, "no new result while the gate stays low");
  endtask
endmodule
