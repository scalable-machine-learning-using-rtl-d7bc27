// tb_spi_slave: an SPI mode-0 master modelled here clocks random bytes into
// the SPI client at 3.2 system clocks per SPI bit (15.6 MHz against 50 MHz)
// across several chip-select frames, while a producer offers a run of data
// bytes. Checks that every byte arrives once and in order on rx, and that
// MISO carries the status byte, then every data byte once and in order,
// then the status byte again.
// Follows the source's 15.6 MHz SPI link; the byte framing is this
// design's own.
module tb_spi_slave;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // an edge, so the asynchronous resets act
  always #50 clk = !clk;           // 100 time units per system clock
  int checks = 0, failures = 0;
  localparam logic [7:0] STATUS = 8'hC3;

  logic sclk, cs_n, mosi, miso, rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_byte, tx_byte;
  spi_slave dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .rx_valid, .rx_byte,
                 .tx_valid, .tx_byte, .tx_ready, .status(STATUS));

  byte unsigned sent [$], got_rx [$], got_miso [$], data [$];
  int n_data_sent;

  always @(posedge clk) if (rx_valid) got_rx.push_back(rx_byte);

  // producer
  initial begin
    tx_valid = 0; tx_byte = 0; n_data_sent = 0;
    for (int i = 0; i < 40; i++) begin
      byte unsigned v;
      v = byte'($urandom_range(255));
      if (v == STATUS) v = 8'h00;
      data.push_back(v);
    end
    wait (rst_n);
    repeat (200) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); tx_valid = 1; tx_byte = data[i];
      do @(negedge clk); while (!tx_ready);
      tx_valid = 0;
    end
  end

  task automatic xfer(byte unsigned o);
    byte unsigned in;
    for (int b = 7; b >= 0; b--) begin
      mosi = o[b];
      #160 sclk = 1; in[b] = miso;
      #160 sclk = 0;
    end
    sent.push_back(o);
    got_miso.push_back(in);
  endtask

  initial begin
    sclk = 0; cs_n = 0; mosi = 0;   // frame reset rises with the reset at #1
    repeat (3) @(posedge clk);
    cs_n = 1;
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int f = 0; f < 6; f++) begin
      cs_n = 0; #400;
      for (int i = 0; i < 20; i++) xfer(byte'($urandom_range(255)));
      #400 cs_n = 1; #1000;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (got_rx.size() != sent.size()) begin failures++; $display("FAIL %0d bytes received of %0d", got_rx.size(), sent.size()); end
    for (int i = 0; i < sent.size() && i < got_rx.size(); i++) begin
      checks++;
      if (got_rx[i] != sent[i]) begin failures++; $display("FAIL rx byte %0d got %h exp %h", i, got_rx[i], sent[i]); end
    end
    begin
      int k;
      k = 1;   // the first byte after reset is zero, before any status was staged
      while (k < got_miso.size() && got_miso[k] == STATUS) k++;
      for (int i = 0; i < 40; i++) begin
        checks++;
        if (k + i >= got_miso.size() || got_miso[k + i] != data[i]) begin
          failures++; $display("FAIL miso data %0d (k=%0d size=%0d)", i, k, got_miso.size());
        end
      end
      for (int i = k + 40; i < got_miso.size(); i++) begin
        checks++;
        if (got_miso[i] != STATUS) begin failures++; $display("FAIL miso byte %0d not status", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
