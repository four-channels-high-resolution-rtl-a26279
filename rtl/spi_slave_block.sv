// spi_slave_block: SPI slave through which the microcontroller reads the
// eight 32-bit counter results (and may write one 32-bit word).
//
// Frame (this design's choice; the published design gives the ports only):
// SPI mode 0 (SCLK idles low, both sides sample on the rising edge and shift
// on the falling edge), MSB first, ss_n low for the whole frame. A frame is
// 40 bits: a command byte {write, 0, addr[5:0]} followed by a 32-bit word.
//  * Read (write = 0): after the command byte the slave shifts out
//    tx_data[addr] on miso; addresses 8 and above read as zero. The word is
//    copied in one go on the falling SCLK edge after the command byte, so a
//    result that is replaced while the word is being shifted cannot tear.
//  * Write (write = 1): the 32 bits on mosi are presented on rx_data, addr on
//    rx_address, and rrdy rises on the 40th rising SCLK edge. rrdy stays high
//    until rx_req (or reset_n low) clears it.
// miso is low while ss_n is high or during the command byte.
//
// The block is clocked by SCLK only, as in the published design, which gives
// it no system clock: the bit counter and shift registers are cleared
// asynchronously by ss_n high. tx_data comes from the 300 MHz domain; the
// master should read after the interrupt flag tells it a new set of results
// is stable. rrdy is set by SCLK and cleared asynchronously by rx_req.
module spi_slave_block
  import fc_pkg::*;
(
  input  logic              sclk,
  input  logic              ss_n,
  input  logic              mosi,
  output logic              miso,
  input  logic              reset_n,
  input  cnt_t              tx_data [N_TX],
  input  logic              rx_req,
  output logic [ADDR_W-1:0] rx_address,
  output cnt_t              rx_data,
  output logic              rrdy
);

  localparam int unsigned BC_W = $clog2(SPI_FRAME_BITS + 1);

  logic [BC_W-1:0] bit_cnt;    // rising SCLK edges seen in this frame
  spi_cmd_t        cmd;
  logic [CNT_W-2:0] rx_shift;   // first 31 data bits; the 32nd comes from mosi
  cnt_t            tx_shift;
  logic            last_bit;

  assign last_bit = (bit_cnt == BC_W'(SPI_FRAME_BITS - 1));

  // Receive side: rising SCLK edges.
  always_ff @(posedge sclk or posedge ss_n) begin
    if (ss_n) begin
      bit_cnt  <= '0;
      cmd      <= '0;
      rx_shift <= '0;
    end else begin
      if (bit_cnt != BC_W'(SPI_FRAME_BITS)) bit_cnt <= bit_cnt + 1'b1;
      if (bit_cnt < BC_W'(SPI_CMD_BITS)) cmd      <= {cmd[SPI_CMD_BITS-2:0], mosi};
      else                               rx_shift <= {rx_shift[CNT_W-3:0], mosi};
    end
  end

  // Received word and its flag.
  logic rx_clr;
  assign rx_clr = ~reset_n | rx_req;

  always_ff @(posedge sclk or negedge reset_n) begin
    if (!reset_n) begin
      rx_address <= '0;
      rx_data    <= '0;
    end else if (last_bit && cmd.write) begin   // bit_cnt is held at 0 while ss_n is high
      rx_address <= cmd.addr;
      rx_data    <= {rx_shift, mosi};
    end
  end

  always_ff @(posedge sclk or posedge rx_clr) begin
    if (rx_clr)                               rrdy <= 1'b0;
    else if (last_bit && cmd.write)           rrdy <= 1'b1;
  end

  // Transmit side: falling SCLK edges.
  always_ff @(negedge sclk or posedge ss_n) begin
    if (ss_n) begin
      tx_shift <= '0;
    end else if (bit_cnt == BC_W'(SPI_CMD_BITS)) begin
      if (!cmd.write && (int'(cmd.addr) < N_TX)) tx_shift <= tx_data[cmd.addr[$clog2(N_TX)-1:0]];
      else                                       tx_shift <= '0;
    end else begin
      tx_shift <= {tx_shift[CNT_W-2:0], 1'b0};
    end
  end

  assign miso = ~ss_n & tx_shift[CNT_W-1];

endmodule
