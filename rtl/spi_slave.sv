// spi_slave: the worker's SPI client, the link from the Raspberry Pi that
// carries all host traffic to the FPGA (SPI mode 0 sampling, most
// significant bit first, one chip select, frames of whole bytes).
//
// The shift registers run on the SPI clock itself, because at the link's
// 15.6 MHz there are too few system clocks per SPI bit to oversample it. MOSI
// is sampled on each rising edge of sclk. MISO is updated right after each
// rising edge, so it is stable when the host samples on the next one. Each
// completed byte flips a toggle that is synchronised into the system clock
// domain, where it becomes a one-cycle rx_valid with rx_byte.
//
// Sending is full duplex and runs one byte behind: in the middle of byte k
// (after its fourth bit) the sclk side captures the staged byte tx_hold and
// flips a capture toggle; that byte goes out as byte k+1 (or as the first byte
// of the next frame). The system side stages a data byte (tx_valid/tx_byte,
// taken with a tx_ready pulse) only right after it has seen a capture, so a
// data byte never changes while it could be captured; when it has no data
// it stages the status byte. The host therefore needs to keep clocking
// bytes (e.g. no-op bytes) to read responses, and tx_byte appears about one
// byte after it is taken.
//
// From the source: the SPI link and its 15.6 MHz clock; the rest is this
// design's choice.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  // SPI pins
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  // system side
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  input  logic       tx_valid,
  input  logic [7:0] tx_byte,
  output logic       tx_ready,
  input  logic [7:0] status
);
  // ---------------------------------------------------------- sclk domain
  logic [2:0] bitcnt;
  logic [6:0] rx_sr;
  logic [7:0] rx_hold;
  logic       rx_tgl, cap_tgl;
  logic [7:0] tx_sr, tx_nx;
  logic [7:0] tx_hold;     // system domain

  // the bit counter restarts whenever the chip select is high, and at reset
  logic frame_rst;
  assign frame_rst = cs_n || !rst_n;

  always_ff @(posedge sclk or posedge frame_rst) begin
    if (frame_rst) bitcnt <= '0;
    else      bitcnt <= bitcnt + 3'd1;
  end

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr   <= '0;
      rx_hold <= '0;
      rx_tgl  <= 1'b0;
      cap_tgl <= 1'b0;
      tx_sr   <= '0;
      tx_nx   <= '0;
    end else begin
      rx_sr <= {rx_sr[5:0], mosi};
      if (bitcnt == 3'd7) begin
        rx_hold <= {rx_sr, mosi};
        rx_tgl  <= !rx_tgl;
        tx_sr   <= tx_nx;
      end else begin
        tx_sr   <= {tx_sr[6:0], 1'b0};
      end
      if (bitcnt == 3'd4) begin
        tx_nx   <= tx_hold;
        cap_tgl <= !cap_tgl;
      end
    end
  end

  assign miso = tx_sr[7];

  // -------------------------------------------------------- system domain
  logic [2:0] rx_sync, cap_sync;
  logic       hold_is_data;
  logic       captured;

  assign captured = cap_sync[2] != cap_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync      <= '0;
      cap_sync     <= '0;
      rx_valid     <= 1'b0;
      rx_byte      <= '0;
      tx_hold      <= '0;
      hold_is_data <= 1'b0;
      tx_ready     <= 1'b0;
    end else begin
      rx_sync  <= {rx_sync[1:0], rx_tgl};
      cap_sync <= {cap_sync[1:0], cap_tgl};
      rx_valid <= 1'b0;
      tx_ready <= 1'b0;
      if (rx_sync[2] != rx_sync[1]) begin
        rx_valid <= 1'b1;
        rx_byte  <= rx_hold;
      end
      if (captured) begin
        if (tx_valid) begin
          tx_hold      <= tx_byte;
          hold_is_data <= 1'b1;
          tx_ready     <= 1'b1;
        end else begin
          tx_hold      <= status;
          hold_is_data <= 1'b0;
        end
      end else if (!hold_is_data) begin
        tx_hold <= status;
      end
    end
  end
endmodule
