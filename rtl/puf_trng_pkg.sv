// puf_trng_pkg: constants and types shared by the DD-cell PUF+TRNG.
//
// The numbers that come from the measured design are the array size (128
// DD-cells), the high-speed excitation clock (450 MHz, one tick = 2.22 ns),
// the PUF sampling time (128 cycles of the 50 MHz clock = 1152 fast cycles),
// the TRNG sampling time of the reference board (16 fast cycles) and its
// XOR-combining depth (4 rounds, at most 7 seen across boards). The command
// codes of the host interface and the FIFO size are this design's own choice.
`timescale 1ps/1fs
package puf_trng_pkg;

  localparam int unsigned N_DD_CELLS        = 128;  // DD-cells in the array
  localparam int unsigned NCLK_W         = 12;   // covers 1..4095 fast cycles (~9.1 us)
  localparam int unsigned NCLK_PUF       = 1152; // 450/50 * 128
  localparam int unsigned NCLK_TRNG      = 16;   // optimum on the reference board
  localparam int unsigned XOR_ROUNDS_DEF = 4;
  localparam int unsigned XOR_ROUNDS_MAX = 7;    // 128 >> 7 = 1 bit
  localparam int unsigned ROUNDS_W       = 3;
  localparam int unsigned FIFO_DEPTH     = 128;  // bytes = 1024 bits

  // Host command bytes (first byte of every SPI transaction).
  typedef enum logic [7:0] {
    CMD_NOP        = 8'h00,
    CMD_SET_NCLK_P = 8'h10,  // + 2 bytes: PUF NCLK, high byte first
    CMD_SET_NCLK_T = 8'h11,  // + 2 bytes: TRNG NCLK, high byte first
    CMD_SET_XOR    = 8'h12,  // + 1 byte: XOR rounds (0..7)
    CMD_PUF_EVAL   = 8'h20,  // run one PUF excitation
    CMD_PUF_READ   = 8'h21,  // read the 16-byte response, byte 0 = cells 7..0
    CMD_TRNG_START = 8'h30,
    CMD_TRNG_STOP  = 8'h31,
    CMD_TRNG_READ  = 8'h32,  // each further byte pops one FIFO byte (0 if empty)
    CMD_FIFO_LEVEL = 8'h33   // next byte returns the FIFO fill level
  } cmd_e;

  // Status byte, returned as the first MISO byte of every transaction.
  typedef struct packed {
    logic       trng_on;
    logic       puf_busy;
    logic       puf_valid;
    logic       fifo_full;
    logic       fifo_empty;
    logic [2:0] xor_rounds;
  } status_t;

endpackage
