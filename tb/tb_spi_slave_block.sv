// tb_spi_slave_block: a bus-functional SPI master reads all eight words
// several times with random contents, reads unmapped addresses, writes words
// and checks rx_address / rx_data / rrdy and the rx_req clear.
module tb_spi_slave_block;
  import fc_pkg::*;
  spi_master_if spi ();
  logic reset_n = 1'b1;
  logic rx_req = 1'b0;
  cnt_t tx_data [N_TX];
  logic [ADDR_W-1:0] rx_address;
  cnt_t rx_data;
  logic rrdy;
  int checks = 0, failures = 0;

  spi_slave_block dut (
    .sclk(spi.sclk), .ss_n(spi.ss_n), .mosi(spi.mosi), .miso(spi.miso),
    .reset_n(reset_n), .tx_data(tx_data), .rx_req(rx_req),
    .rx_address(rx_address), .rx_data(rx_data), .rrdy(rrdy)
  );

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] r;
    cnt_t w;
    logic [5:0] a;
    foreach (tx_data[i]) tx_data[i] = '0;
    #1ns reset_n = 1'b0;  // a falling edge for the asynchronous resets
    #100ns reset_n = 1'b1;
    #100ns;
    check(rrdy == 1'b0 && rx_data == '0, "receive side clear after reset");
    for (int round = 0; round < 4; round++) begin
      foreach (tx_data[i]) tx_data[i] = (round == 0) ? cnt_t'(32'h8000_0001 << i) : cnt_t'($urandom);
      for (int i = 0; i < N_TX; i++) begin
        spi.xfer(1'b0, 6'(i), 32'h0, r);
        check(r == tx_data[i], $sformatf("read word %0d: %h expected %h", i, r, tx_data[i]));
      end
    end
    spi.xfer(1'b0, 6'd8, 32'h0, r);
    check(r == 32'h0, "address 8 reads zero");
    spi.xfer(1'b0, 6'd63, 32'h0, r);
    check(r == 32'h0, "address 63 reads zero");
    check(rrdy == 1'b0, "reads do not raise rrdy");
    // Word loaded while the frame is under way: the copy taken after the
    // command byte is what comes out.
    tx_data[3] = 32'hCAFE_F00D;
    fork
      spi.xfer(1'b0, 6'd3, 32'h0, r);
      begin #(12 * 100ns); tx_data[3] = 32'h1234_5678; end
    join
    check(r == 32'hCAFE_F00D, $sformatf("word copied once per frame (got %h)", r));
    // Writes.
    for (int k = 0; k < 5; k++) begin
      w = cnt_t'($urandom);
      a = 6'($urandom);
      spi.xfer(1'b1, a, w, r);
      check(rrdy == 1'b1, "rrdy after write");
      check(rx_data == w && rx_address == a,
            $sformatf("write %h to %0d, got %h at %0d", w, a, rx_data, rx_address));
      check(r == 32'h0, "miso quiet during write");
      #50ns rx_req = 1'b1;
      #50ns rx_req = 1'b0;
      check(rrdy == 1'b0, "rx_req clears rrdy");
      check(rx_data == w, "rx_data held after rx_req");
    end
    // An aborted frame (ss_n raised early) must not write.
    w = rx_data;
    spi.ss_n = 1'b0;
    for (int i = 0; i < 20; i++) begin
      spi.mosi = 1'b1;
      #50ns spi.sclk = 1'b1;
      #50ns spi.sclk = 1'b0;
    end
    spi.ss_n = 1'b1;
    #100ns;
    check(rrdy == 1'b0 && rx_data == w, "aborted frame ignored");
    spi.xfer(1'b0, 6'd5, 32'h0, r);
    check(r == tx_data[5], "read after aborted frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
