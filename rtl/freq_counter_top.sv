// freq_counter_top: four-channel reciprocal frequency counter for a QCM
// sensor array, as placed in the FPGA.
//
// Four quartz-crystal-microbalance oscillators (about 10 MHz each) drive
// CH[3:0]. A single time gate of TIME_GATE_TOP cycles of the 100 MHz clock
// (1 s by default) paces all channels. Each channel (reciprocal_block) counts
// a whole number of its own input periods and the 300 MHz reference clocks
// they span; the microcontroller reads the eight 32-bit counts over SPI and
// computes f = N_in / N_ref * 300 MHz per channel. The channels share only
// the reference clock and the time gate, and synchronise to their own inputs
// independently.
//
// MCU_INTERRUPT (also on BIT_0) is the time gate registered once more on the
// 100 MHz clock. Its fall marks the end of a gate period; each channel's new
// result is loaded up to four input periods plus a few reference clocks
// later (under 0.5 us for 10 MHz inputs), so the microcontroller should read
// a few microseconds after the fall and finish within the next gate period.
//
// SPI word map (see spi_slave_block for the frame): word i = channel i's input
// count, word 4+i = channel i's reference count, i = 0..3. The SPI slave's
// receive outputs are brought out as ports; nothing inside uses them.
//
// The PLL that makes CLK_REF (300 MHz) and CLK_GATE (100 MHz) from the 50 MHz
// TCXO is the FPGA vendor's clocking primitive and is outside this RTL: both
// clocks are inputs here. RST_N is an active-low asynchronous reset (the
// PLL's locked signal is a natural source); CLK_REF and CLK_GATE should run
// while it is low. The block structure, clock rates, counter widths and
// the interrupt flip-flop follow the published design; the reset polarity
// and the SPI word order are this design's reading of it.
module freq_counter_top
  import fc_pkg::*;
#(
  parameter int unsigned TIME_GATE_TOP = TIME_GATE_TOP_DEFAULT
) (
  input  logic              CLK_REF,       // 300 MHz reference clock
  input  logic              CLK_GATE,      // 100 MHz time-gate clock
  input  logic              RST_N,
  input  logic [N_CH-1:0]   CH,            // QCM oscillator inputs
  input  logic              SCLK,
  input  logic              SS_N,
  input  logic              MOSI,
  output logic              MISO,
  output logic              MCU_INTERRUPT,
  output logic              BIT_0,
  input  logic              RX_REQ,
  output logic [ADDR_W-1:0] RX_ADDRESS,
  output cnt_t              RX_DATA,
  output logic              RRDY
);

  logic time_gate;
  cnt_t tx_data [N_TX];

  timegate_block time_gate_i (
    .RST              (RST_N),
    .CLK              (CLK_GATE),
    .TIME_GATE_TOP    (cnt_t'(TIME_GATE_TOP)),
    .TIME_GATE_SIGNAL (time_gate)
  );

  for (genvar i = 0; i < N_CH; i++) begin : g_channel
    reciprocal_block #(.WIDTH(CNT_W)) reciprocal_counter (
      .CH_CLK           (CH[i]),
      .REF_CLK          (CLK_REF),
      .RST              (RST_N),
      .TIME_GATE_SIGNAL (time_gate),
      .CH_COUNTER       (tx_data[TX_CH_BASE + i]),
      .REF_COUNTER      (tx_data[TX_REF_BASE + i])
    );
  end

  spi_slave_block spi_slave (
    .sclk       (SCLK),
    .ss_n       (SS_N),
    .mosi       (MOSI),
    .miso       (MISO),
    .reset_n    (RST_N),
    .tx_data    (tx_data),
    .rx_req     (RX_REQ),
    .rx_address (RX_ADDRESS),
    .rx_data    (RX_DATA),
    .rrdy       (RRDY)
  );

  // Interrupt flag: the time gate, registered on the gate clock.
  logic time_gate_int;

  always_ff @(posedge CLK_GATE or negedge RST_N) begin
    if (!RST_N) time_gate_int <= 1'b0;
    else        time_gate_int <= time_gate;
  end

  assign MCU_INTERRUPT = time_gate_int;
  assign BIT_0         = time_gate_int;

endmodule
