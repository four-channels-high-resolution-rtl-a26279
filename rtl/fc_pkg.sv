// fc_pkg: constants and types shared by the four-channel reciprocal frequency
// counter.
//
// The counter widths, the channel count and the clock rates follow the
// published design: four channels, 32-bit counters, a 300 MHz reference clock
// and a 100 MHz time-gate clock, both made by the FPGA PLL from a 50 MHz TCXO.
// The SPI command layout (one command byte, then one 32-bit word) is this
// design's own choice; the published design names the SPI slave's ports but
// not its frame format.
package fc_pkg;

  // Datapath sizes.
  localparam int unsigned CNT_W  = 32;        // every counter is a 32-bit up counter
  localparam int unsigned N_CH   = 4;         // input channels
  localparam int unsigned N_TX   = 2 * N_CH;  // words the MCU can read over SPI
  localparam int unsigned ADDR_W = 6;         // SPI word address width (rx_address[5:0])

  // Clock plan: the reciprocal counters' time base CLK_REF is 300 MHz and the
  // time gate runs on a 100 MHz clock, both from the PLL (50 MHz TCXO x 6 and
  // x 2). The RTL itself does not depend on the rates.

  // Time-gate length in 100 MHz cycles: 100,000,000 counts give a 1 s gate.
  // In the field this number is trimmed against a 10 MHz rubidium standard.
  localparam int unsigned TIME_GATE_TOP_DEFAULT = 100_000_000;

  typedef logic [CNT_W-1:0] cnt_t;

  // SPI word map: word i (0..3) is channel i's input-signal count, word
  // 4+i its reference-clock count.
  localparam int unsigned TX_CH_BASE  = 0;
  localparam int unsigned TX_REF_BASE = N_CH;

  // SPI command byte, sent MSB first ahead of the 32-bit data word.
  typedef struct packed {
    logic              write;  // 1: MCU writes a word, 0: MCU reads one
    logic              rsvd;   // sent as 0
    logic [ADDR_W-1:0] addr;   // word address
  } spi_cmd_t;

  localparam int unsigned SPI_CMD_BITS   = $bits(spi_cmd_t);
  localparam int unsigned SPI_FRAME_BITS = SPI_CMD_BITS + CNT_W;

  typedef enum logic {
    EDGE_RISING  = 1'b0,
    EDGE_FALLING = 1'b1
  } edge_kind_e;

endpackage
