// spi_slave: SPI target (mode 0, MSB first) for the USB-SPI host bridge.
//
// SCK, MOSI and SSEL_N come from an external master and are brought into the
// clk domain through two-flop synchronisers; edges of SCK are found there, so
// the SCK frequency must stay below about a sixth of clk (450 MHz / 6 = 75
// MHz, well above the 30 MHz a USB-SPI bridge gives).
//   - SSEL_N low starts a transaction: the bit counter clears and `tx_byte`
//     is loaded into the transmit shifter (`tx_load` pulses).
//   - each rising SCK edge shifts MOSI in; after 8 bits `rx_byte` is valid
//     for the cycle in which `rx_valid` pulses (`rx_first` marks the first
//     byte of a transaction).
//   - each falling SCK edge shifts the next bit out on MISO; after a whole
//     byte it loads `tx_byte` again (`tx_load` pulses), so the user has half
//     an SCK period after `rx_valid` to present the next byte.
//   - SSEL_N high ends the transaction (`cs_end` pulses).
// The document names the four SPI signals only; the mode, bit order and
// byte framing are this design's choice.
`timescale 1ps/1fs
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sck,
  input  logic       mosi,
  input  logic       ssel_n,
  output logic       miso,
  output logic [7:0] rx_byte,
  output logic       rx_valid,
  output logic       rx_first,
  input  logic [7:0] tx_byte,
  output logic       tx_load,
  output logic       cs_end
);

  logic [2:0] sck_q;
  logic [1:0] mosi_q;
  logic [2:0] ss_q;
  logic [2:0] bitcnt;
  logic [6:0] rx_sh;
  logic [7:0] tx_sh;
  logic       first;

  logic sck_rise, sck_fall, ss_fall, ss_rise, active;

  assign sck_rise = (sck_q[2:1] == 2'b01);
  assign sck_fall = (sck_q[2:1] == 2'b10);
  assign ss_fall  = (ss_q[2:1] == 2'b10);
  assign ss_rise  = (ss_q[2:1] == 2'b01);
  assign active   = !ss_q[1];
  assign miso     = tx_sh[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_q    <= '0;
      mosi_q   <= '0;
      ss_q     <= '1;
      bitcnt   <= '0;
      rx_sh    <= '0;
      tx_sh    <= '0;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
      rx_first <= 1'b0;
      tx_load  <= 1'b0;
      cs_end   <= 1'b0;
      first    <= 1'b0;
    end else begin
      sck_q    <= {sck_q[1:0], sck};
      mosi_q   <= {mosi_q[0], mosi};
      ss_q     <= {ss_q[1:0], ssel_n};
      rx_valid <= 1'b0;
      tx_load  <= 1'b0;
      cs_end   <= ss_rise;
      if (ss_fall) begin
        bitcnt  <= '0;
        tx_sh   <= tx_byte;
        tx_load <= 1'b1;
        first   <= 1'b1;
      end else if (active) begin
        if (sck_rise) begin
          rx_sh  <= {rx_sh[5:0], mosi_q[1]};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 3'd7) begin
            rx_byte  <= {rx_sh[6:0], mosi_q[1]};
            rx_valid <= 1'b1;
            rx_first <= first;
            first    <= 1'b0;
          end
        end else if (sck_fall) begin
          if (bitcnt == 3'd0) begin
            tx_sh   <= tx_byte;
            tx_load <= 1'b1;
          end else begin
            tx_sh <= {tx_sh[6:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
