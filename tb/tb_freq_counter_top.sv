// tb_freq_counter_top: end-to-end run of the four-channel counter with a
// shortened time gate (5000 gate clocks = 50 us instead of 1 s).
//
// Four input clocks of unrelated periods run from time zero: three near
// 10 MHz (one at 9,995,402 Hz, the range of a loaded QCM) and one at 3.7 MHz. A
// microcontroller model waits for the fall of MCU_INTERRUPT, reads the eight
// counts over SPI, computes f = N_in / N_ref * f_ref for each channel and
// compares it with the true input frequency, allowing one reference count of
// error. It also checks that the gate period is TIME_GATE_TOP gate clocks,
// that BIT_0 follows MCU_INTERRUPT, and uses the SPI write path.
//
// Mechanisms counted (each must occur): gate periods, complete result sets
// read, gate low pulses that fell between two input edges of a channel (the
// held gate request is then what ends the measurement), SPI writes with rrdy
// set and cleared by RX_REQ.
module tb_freq_counter_top;
  import fc_pkg::*;
  localparam int unsigned TOP      = 5000;
  localparam int unsigned REF_HALF = 1667;    // ps, ~300 MHz
  localparam int unsigned GATE_HALF = 5000;   // ps, 100 MHz
  localparam int          N_SETS   = 4;
  localparam int unsigned CH_HALF [N_CH] = '{50_000, 49_997, 50_023, 135_135};

  logic clk_ref = 1'b0, clk_gate = 1'b0, rst_n = 1'b1;
  logic [N_CH-1:0] ch = '0;
  logic mcu_int, bit0, rx_req = 1'b0, rrdy;
  logic [ADDR_W-1:0] rx_address;
  cnt_t rx_data;
  spi_master_if #(.HALF_PS(20_000)) spi ();

  int checks = 0, failures = 0;
  int n_gates = 0, n_sets = 0, n_missed_low = 0, n_writes = 0;

  freq_counter_top #(.TIME_GATE_TOP(TOP)) dut (
    .CLK_REF(clk_ref), .CLK_GATE(clk_gate), .RST_N(rst_n), .CH(ch),
    .SCLK(spi.sclk), .SS_N(spi.ss_n), .MOSI(spi.mosi), .MISO(spi.miso),
    .MCU_INTERRUPT(mcu_int), .BIT_0(bit0),
    .RX_REQ(rx_req), .RX_ADDRESS(rx_address), .RX_DATA(rx_data), .RRDY(rrdy)
  );

  always #(REF_HALF * 1ps)  clk_ref  = ~clk_ref;
  always #(GATE_HALF * 1ps) clk_gate = ~clk_gate;
  for (genvar i = 0; i < N_CH; i++) begin : g_src
    always #(CH_HALF[i] * 1ps) ch[i] = ~ch[i];
  end

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

  // Gate period in gate clocks, measured on the interrupt flag.
  always @(negedge mcu_int) if (rst_n) begin
    static time last = 0;
    if (last != 0)
      check((($time - last) / (2 * GATE_HALF * 1ps)) == TOP,
            $sformatf("gate period %0t", $time - last));
    last = $time;
    n_gates++;
  end

  always @(mcu_int or bit0) #1ps check(mcu_int == bit0, "BIT_0 follows MCU_INTERRUPT");

  // Did a channel's rising edge fall inside the gate's low pulse? The
  // interrupt flag is the gate delayed by one gate clock, so its low pulse
  // has the same length and stands in for it.
  always @(negedge mcu_int) if (rst_n) begin
    logic [N_CH-1:0] seen;
    seen = '0;
    fork
      begin : watch
        forever begin
          @(posedge ch[0] or posedge ch[1] or posedge ch[2] or posedge ch[3]);
          seen |= ch;
        end
      end
      @(posedge mcu_int);
    join_any
    disable watch;
    for (int i = 0; i < N_CH; i++) if (!seen[i]) n_missed_low++;
  end

  initial begin
    logic [31:0] r;
    cnt_t n_in [N_CH], n_ref [N_CH];
    real f_ref, f_true, f_meas, tol;
    f_ref = 1.0e12 / real'(2 * REF_HALF);
    #1ns rst_n = 1'b0;  // a falling edge for the asynchronous resets
    #100ns rst_n = 1'b1;
    // The first gate after reset already gives a whole measurement.
    for (int s = 0; s < N_SETS; s++) begin
      @(negedge mcu_int);
      #2us;
      for (int i = 0; i < N_CH; i++) begin
        spi.xfer(1'b0, 6'(TX_CH_BASE + i), 32'h0, r);  n_in[i]  = r;
        spi.xfer(1'b0, 6'(TX_REF_BASE + i), 32'h0, r); n_ref[i] = r;
      end
      for (int i = 0; i < N_CH; i++) begin
        f_true = 1.0e12 / real'(2 * CH_HALF[i]);
        check(n_ref[i] != 0, $sformatf("channel %0d has a result", i));
        f_meas = (n_ref[i] == 0) ? 0.0 : real'(n_in[i]) / real'(n_ref[i]) * f_ref;
        tol    = (n_ref[i] == 0) ? 0.0 : 1.01 * f_meas / real'(n_ref[i]);
        check(f_meas > f_true - tol && f_meas < f_true + tol,
              $sformatf("set %0d ch %0d: N_in=%0d N_ref=%0d f=%.3f Hz, true %.3f Hz (+-%.3f)",
                        s, i, n_in[i], n_ref[i], f_meas, f_true, tol));
        check(real'(n_in[i]) > 0.9 * real'(TOP) * 1.0e4 / real'(2 * CH_HALF[i]) &&
              real'(n_in[i]) < real'(TOP) * 1.0e4 / real'(2 * CH_HALF[i]) + 1.0,
              $sformatf("ch %0d counted %0d periods in one gate", i, n_in[i]));
      end
      n_sets++;
      // The SPI write path: the word lands on RX_DATA and RX_REQ clears RRDY.
      spi.xfer(1'b1, 6'(s + 8), 32'hA5A5_0000 + 32'(s), r);
      check(rrdy && rx_data == 32'hA5A5_0000 + 32'(s) && rx_address == 6'(s + 8), "SPI write");
      rx_req = 1'b1;
      #20ns rx_req = 1'b0;
      check(!rrdy, "RX_REQ clears RRDY");
      if (!rrdy) n_writes++;
    end
    check(n_gates >= N_SETS, $sformatf("gate periods: %0d", n_gates));
    check(n_sets == N_SETS, $sformatf("result sets read: %0d", n_sets));
    check(n_missed_low > 0, $sformatf("gate low pulses between input edges: %0d", n_missed_low));
    check(n_writes == N_SETS, $sformatf("SPI writes: %0d", n_writes));
    $display("gate periods %0d, result sets %0d, low pulses between input edges %0d, SPI writes %0d",
             n_gates, n_sets, n_missed_low, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
