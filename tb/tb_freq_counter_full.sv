// tb_freq_counter_full: one complete measurement at the design's own sizes:
// a 1 s time gate (100,000,000 cycles of the 100 MHz gate clock), a 300 MHz
// reference and four inputs near 10 MHz, then an SPI read of all eight counts
// by a microcontroller model, which computes f = N_in / N_ref * f_ref and
// compares it with the true input frequency to within one reference count
// (about 0.033 Hz at 10 MHz).
//
// To keep the event count down, all six clocks come from one process that
// always advances to the next edge of whichever clock is due.
module tb_freq_counter_full;
  import fc_pkg::*;
  localparam int     N_CLK = N_CH + 2;
  // Half periods in ps: reference (~300 MHz), gate (100 MHz), four inputs.
  localparam longint HALF [N_CLK] = '{1667, 5000, 50_000, 49_997, 50_023, 49_977};

  logic clk_ref = 1'b0, clk_gate = 1'b0, rst_n = 1'b1;
  logic [N_CH-1:0] ch = '0;
  logic mcu_int, bit0, rrdy;
  logic [ADDR_W-1:0] rx_address;
  cnt_t rx_data;
  spi_master_if #(.HALF_PS(50_000)) spi ();
  int checks = 0, failures = 0;

  freq_counter_top dut (
    .CLK_REF(clk_ref), .CLK_GATE(clk_gate), .RST_N(rst_n), .CH(ch),
    .SCLK(spi.sclk), .SS_N(spi.ss_n), .MOSI(spi.mosi), .MISO(spi.miso),
    .MCU_INTERRUPT(mcu_int), .BIT_0(bit0),
    .RX_REQ(1'b0), .RX_ADDRESS(rx_address), .RX_DATA(rx_data), .RRDY(rrdy)
  );

  initial begin
    longint next [N_CLK];
    longint now, t;
    now = 0;
    for (int i = 0; i < N_CLK; i++) next[i] = HALF[i];
    forever begin
      t = next[0];
      for (int i = 1; i < N_CLK; i++) if (next[i] < t) t = next[i];
      #((t - now) * 1ps);
      now = t;
      for (int i = 0; i < N_CLK; i++) begin
        if (next[i] == now) begin
          next[i] += HALF[i];
          case (i)
            0:       clk_ref  = ~clk_ref;
            1:       clk_gate = ~clk_gate;
            default: ch[i-2]  = ~ch[i-2];
          endcase
        end
      end
    end
  end

  initial begin
    #1100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    cnt_t n_in, n_ref;
    real f_ref, f_true, f_meas, tol;
    time t_rise;
    f_ref = 1.0e12 / real'(2 * HALF[0]);
    #1ns rst_n = 1'b0;  // a falling edge for the asynchronous resets
    #100ns rst_n = 1'b1;
    @(posedge mcu_int);
    t_rise = $time;
    @(negedge mcu_int);
    check(($time - t_rise) / 10ns == longint'(TIME_GATE_TOP_DEFAULT) - 1,
          $sformatf("gate high for %0t", $time - t_rise));
    #2us;
    for (int i = 0; i < N_CH; i++) begin
      spi.xfer(1'b0, 6'(TX_CH_BASE + i), 32'h0, r);  n_in  = r;
      spi.xfer(1'b0, 6'(TX_REF_BASE + i), 32'h0, r); n_ref = r;
      f_true = 1.0e12 / real'(2 * HALF[i + 2]);
      f_meas = (n_ref == 0) ? 0.0 : real'(n_in) / real'(n_ref) * f_ref;
      tol    = (n_ref == 0) ? 0.0 : 1.01 * f_meas / real'(n_ref);
      $display("channel %0d: N_in=%0d N_ref=%0d f=%.3f Hz (true %.3f Hz, resolution %.3f Hz)",
               i, n_in, n_ref, f_meas, f_true, tol);
      check(n_ref > 32'd299_000_000, "N_ref covers about one second");
      check(f_meas > f_true - tol && f_meas < f_true + tol, $sformatf("channel %0d frequency", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
endmodule
