// puf_trng_top: re-configurable PUF + TRNG built on one array of DD-cells.
//
// One array of N_DD_CELLS metastable DD-cells serves both primitives; only the
// time the cells are allowed to race differs. A long S pulse (PUF NCLK,
// default 1152 cycles of the 450 MHz clock) lets every cell settle to the
// sign of its own delay mismatch: the 128-bit word is the device fingerprint.
// A short S pulse (TRNG NCLK, default 16 cycles) samples the cells while they
// still oscillate: the bits are random, and XOR-combining 2^rounds of them
// (default 4 rounds) gives a balanced stream of N_DD_CELLS >> rounds bits per
// excitation, packed into bytes and queued in a FIFO.
//
//   SPI (sck, mosi, ssel_n, miso)
//     -> spi_slave -> puf_trng_ctrl (commands, NCLK, XOR rounds, mode switch)
//   puf_trng_ctrl -> dd_excite -> R, S -> dd_array -> dd_excite (sample)
//   sample -> PUF response register (in puf_trng_ctrl)
//          -> xor_combiner -> trng_packer -> sync_fifo -> SPI reads
//
// Everything runs on clk_h, the 450 MHz excitation clock. dd_array is a
// behavioural model of the hand-placed cells (see dd_cell); the rest is
// synthesizable. One TRNG excitation takes NCLK+2 clk_h cycles, giving
// N_DD_CELLS * f / ((NCLK+2) * 2^rounds) = 200 Mbit/s at the defaults.
// DEVICE_SEED selects which "chip" the cell models imitate.
`timescale 1ps/1fs
module puf_trng_top
  import puf_trng_pkg::*;
#(
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic clk_h,     // 450 MHz
  input  logic rst_n,     // asynchronous, active low
  input  logic sck,
  input  logic mosi,
  input  logic ssel_n,
  output logic miso,
  // status, e.g. for LEDs or a logic analyser
  output logic trng_on,   // continuous TRNG excitation enabled
  output logic puf_busy,  // the PUF excitation owns the cell array
  output logic stalled    // TRNG excitation waiting for FIFO space
);

  localparam int unsigned NBW = $clog2(N_DD_CELLS + 1);

  // SPI bytes
  logic [7:0] rx_byte, tx_byte;
  logic       rx_valid, rx_first, tx_load, cs_end;
  // excitation
  logic              ex_start, ex_run, ex_ready, ex_busy;
  logic [NCLK_W-1:0] ex_nclk;
  logic              dd_r, dd_s;
  logic [N_DD_CELLS-1:0] cells, sample;
  logic              sample_valid;
  // TRNG path
  logic [ROUNDS_W-1:0] xor_rounds;
  logic [N_DD_CELLS-1:0]  xored;
  logic [NBW-1:0]      xbits;
  logic                trng_sample_valid, packer_ready;
  logic [7:0]          pbyte;
  logic                pvalid, pready;
  logic [7:0]          fifo_rdata;
  logic                fifo_empty, fifo_full, fifo_rd;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level;

  spi_slave u_spi (
    .clk (clk_h), .rst_n,
    .sck, .mosi, .ssel_n, .miso,
    .rx_byte, .rx_valid, .rx_first, .tx_byte, .tx_load, .cs_end
  );

  puf_trng_ctrl #(.N_CELLS(N_DD_CELLS)) u_ctrl (
    .clk (clk_h), .rst_n,
    .rx_byte, .rx_valid, .rx_first, .tx_load, .cs_end, .tx_byte,
    .ex_start, .ex_run, .ex_nclk, .ex_ready, .ex_busy,
    .sample, .sample_valid,
    .xor_rounds, .trng_sample_valid, .packer_ready,
    .fifo_rdata, .fifo_empty, .fifo_full, .fifo_level, .fifo_rd,
    .puf_active (puf_busy), .trng_on
  );

  dd_excite #(.N_CELLS(N_DD_CELLS), .NCLK_W(NCLK_W)) u_excite (
    .clk (clk_h), .rst_n,
    .start (ex_start), .run (ex_run), .nclk (ex_nclk), .ready (ex_ready),
    .dd_r, .dd_s, .cells, .sample, .sample_valid,
    .busy (ex_busy), .stalled (stalled)
  );

  dd_array #(.N_CELLS(N_DD_CELLS), .DEVICE_SEED(DEVICE_SEED)) u_array (
    .r (dd_r), .s (dd_s), .q (cells)
  );

  xor_combiner #(.N_CELLS(N_DD_CELLS), .MAX_ROUNDS(XOR_ROUNDS_MAX), .ROUNDS_W(ROUNDS_W)) u_xor (
    .din (sample), .rounds (xor_rounds), .dout (xored), .nbits (xbits)
  );

  trng_packer #(.N_CELLS(N_DD_CELLS)) u_pack (
    .clk (clk_h), .rst_n,
    .din (xored), .nbits (xbits), .in_valid (trng_sample_valid), .in_ready (packer_ready),
    .out_byte (pbyte), .out_valid (pvalid), .out_ready (pready)
  );

  assign pready = !fifo_full;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk (clk_h), .rst_n,
    .wr (pvalid && pready), .wdata (pbyte), .rd (fifo_rd), .rdata (fifo_rdata),
    .empty (fifo_empty), .full (fifo_full), .level (fifo_level)
  );

endmodule
