// spi_master_if: the four SPI wires plus a bus-functional SPI master (mode 0,
// MSB first) used by the testbenches to play the microcontroller.
//
// xfer() sends one 40-bit frame: a command byte {write, 0, addr[5:0]} and a
// 32-bit word, and returns the 32 bits read back on miso. SCLK runs at
// 1 / HALF_PS*2 (10 MHz by default). An assertion checks that miso is low
// whenever ss_n is high.
interface spi_master_if #(
  parameter int unsigned HALF_PS = 50_000
);
  logic sclk;
  logic ss_n;
  logic mosi;
  logic miso;

  // ss_n starts low and rises at 1 ps so that the slave's asynchronous
  // clear sees an edge at start-up, as the idle-high line does in hardware.
  initial begin
    sclk = 1'b0;
    ss_n = 1'b0;
    mosi = 1'b0;
    #1ps ss_n = 1'b1;
  end

  task automatic xfer(input logic write, input logic [5:0] addr,
                      input logic [31:0] wdata, output logic [31:0] rdata);
    logic [39:0] frame;
    frame = {write, 1'b0, addr, wdata};
    rdata = '0;
    ss_n  = 1'b0;
    #(HALF_PS * 1ps);
    for (int i = 39; i >= 0; i--) begin
      mosi = frame[i];
      #(HALF_PS * 1ps);
      sclk = 1'b1;                       // both sides sample here
      if (i < 32) rdata[i] = miso;
      #(HALF_PS * 1ps);
      sclk = 1'b0;                       // both sides shift here
    end
    #(HALF_PS * 1ps);
    ss_n = 1'b1;
    mosi = 1'b0;
    #(HALF_PS * 1ps);
  endtask

  // Checked 10 ps after every change of ss_n and every shifting edge.
  always @(posedge ss_n or negedge sclk) begin
    #10ps;
    assert (!(ss_n && miso)) else $error("miso driven while ss_n is high");
  end
endinterface
