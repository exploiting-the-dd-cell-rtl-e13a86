// puf_trng_ctrl: the control FSM between the host SPI link and the DD-cell
// excitation, switching the one cell array between PUF and TRNG use.
//
// Host side: every SPI transaction starts with a command byte (see
// puf_trng_pkg::cmd_e); while it is shifted in, the status byte is shifted
// out. Commands with arguments take them from the following bytes; read
// commands return data in the following bytes:
//   SET_NCLK_P / SET_NCLK_T  hi, lo   S-high time for PUF / TRNG (clk cycles)
//   SET_XOR                  n        XOR-combining rounds (0..7)
//   PUF_EVAL                          one excitation with the PUF NCLK
//   PUF_READ                 -> 16 B  response, byte k = cells 8k+7..8k
//   TRNG_START / TRNG_STOP            continuous excitations with TRNG NCLK
//   TRNG_READ                -> n B   one FIFO byte per byte (0 when empty)
//   FIFO_LEVEL               -> 1 B   FIFO fill level
//
// Array side (the mode switch): while TRNG is on the sequencer runs back to
// back and every sample goes to the XOR combiner and packer. A PUF_EVAL
// takes the array over: continuous running is dropped, the excitation in
// flight finishes (its sample still goes to the TRNG path), then one
// excitation with the PUF NCLK runs and its raw 128 bits are stored as the
// response; TRNG running resumes afterwards by itself. `ex_ready` gives the
// packer's back-pressure to the sequencer in TRNG use and is always high for
// the PUF excitation.
//
// Defaults after reset: PUF NCLK 1152 (128 cycles of the 50 MHz clock at
// 450 MHz), TRNG NCLK 16 and 4 XOR rounds, the values of the reference
// board. The command set and byte format are this design's own choice; the
// document only says that an FSM sends S and R and returns the 128 outputs
// over SPI.
`timescale 1ps/1fs
module puf_trng_ctrl
  import puf_trng_pkg::*;
#(
  parameter int unsigned N_CELLS = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // SPI byte interface
  input  logic [7:0]                 rx_byte,
  input  logic                       rx_valid,
  input  logic                       rx_first,
  input  logic                       tx_load,
  input  logic                       cs_end,
  output logic [7:0]                 tx_byte,
  // excitation sequencer
  output logic                       ex_start,
  output logic                       ex_run,
  output logic [NCLK_W-1:0]          ex_nclk,
  output logic                       ex_ready,
  input  logic                       ex_busy,
  input  logic [N_CELLS-1:0]         sample,
  input  logic                       sample_valid,
  // TRNG path
  output logic [ROUNDS_W-1:0]        xor_rounds,
  output logic                       trng_sample_valid,
  input  logic                       packer_ready,
  input  logic [7:0]                 fifo_rdata,
  input  logic                       fifo_empty,
  input  logic                       fifo_full,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level,
  output logic                       fifo_rd,
  // observation
  output logic                       puf_active,   // the PUF excitation owns the array
  output logic                       trng_on
);

  localparam int unsigned NBYTES = N_CELLS / 8;

  typedef enum logic [2:0] {
    T_CMD, T_ARG_HI, T_ARG_LO, T_XOR, T_PUF_RD, T_FIFO_RD, T_LEVEL, T_IGNORE
  } tstate_e;

  tstate_e            tstate;
  logic               arg_trng;     // the NCLK being written is the TRNG one
  logic [7:0]         arg_hi;
  logic [NCLK_W-1:0]  nclk_puf, nclk_trng;
  logic               puf_req, puf_valid;
  logic [N_CELLS-1:0] resp;
  logic [$clog2(NBYTES)-1:0] idx;
  logic               tx_fifo;      // the byte being sent was taken from the FIFO
  status_t            status;

  assign status = '{trng_on:    trng_on,
                    puf_busy:   puf_req,
                    puf_valid:  puf_valid,
                    fifo_full:  fifo_full,
                    fifo_empty: fifo_empty,
                    xor_rounds: xor_rounds};

  // ---------------------------------------------------------------- host side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate     <= T_CMD;
      arg_trng   <= 1'b0;
      arg_hi     <= '0;
      nclk_puf   <= NCLK_W'(NCLK_PUF);
      nclk_trng  <= NCLK_W'(NCLK_TRNG);
      xor_rounds <= ROUNDS_W'(XOR_ROUNDS_DEF);
      trng_on    <= 1'b0;
      idx        <= '0;
      tx_fifo    <= 1'b0;
    end else begin
      if (tx_load) tx_fifo <= (tstate == T_FIFO_RD) && !fifo_empty;
      if (cs_end) begin
        tstate <= T_CMD;
      end else if (rx_valid && rx_first) begin
        idx <= '0;
        unique case (rx_byte)
          CMD_SET_NCLK_P: begin tstate <= T_ARG_HI; arg_trng <= 1'b0; end
          CMD_SET_NCLK_T: begin tstate <= T_ARG_HI; arg_trng <= 1'b1; end
          CMD_SET_XOR:    tstate <= T_XOR;
          CMD_PUF_READ:   tstate <= T_PUF_RD;
          CMD_TRNG_START: begin trng_on <= 1'b1; tstate <= T_IGNORE; end
          CMD_TRNG_STOP:  begin trng_on <= 1'b0; tstate <= T_IGNORE; end
          CMD_TRNG_READ:  tstate <= T_FIFO_RD;
          CMD_FIFO_LEVEL: tstate <= T_LEVEL;
          default:        tstate <= T_IGNORE;   // NOP, PUF_EVAL, unknown
        endcase
      end else if (rx_valid) begin
        unique case (tstate)
          T_ARG_HI: begin arg_hi <= rx_byte; tstate <= T_ARG_LO; end
          T_ARG_LO: begin
            if (arg_trng) nclk_trng <= NCLK_W'({arg_hi, rx_byte});
            else          nclk_puf  <= NCLK_W'({arg_hi, rx_byte});
            tstate <= T_IGNORE;
          end
          T_XOR:    begin xor_rounds <= rx_byte[ROUNDS_W-1:0]; tstate <= T_IGNORE; end
          T_PUF_RD: idx <= idx + 1'b1;
          default:  ;
        endcase
      end
    end
  end

  assign fifo_rd = rx_valid && !rx_first && (tstate == T_FIFO_RD) && tx_fifo;

  always_comb begin
    unique case (tstate)
      T_CMD:     tx_byte = status;
      T_PUF_RD:  tx_byte = resp[8*idx +: 8];
      T_FIFO_RD: tx_byte = fifo_empty ? 8'h00 : fifo_rdata;
      T_LEVEL:   tx_byte = 8'(fifo_level);
      default:   tx_byte = 8'h00;
    endcase
  end

  // --------------------------------------------------------------- array side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      puf_req    <= 1'b0;
      puf_valid  <= 1'b0;
      puf_active <= 1'b0;
      ex_start   <= 1'b0;
      resp       <= '0;
    end else begin
      ex_start <= 1'b0;
      if (rx_valid && rx_first && rx_byte == CMD_PUF_EVAL) begin
        puf_req   <= 1'b1;
        puf_valid <= 1'b0;
      end
      if (puf_req && !puf_active && !ex_busy && !ex_start) begin
        puf_active <= 1'b1;
        ex_start   <= 1'b1;
      end
      if (sample_valid && puf_active) begin
        resp       <= sample;
        puf_valid  <= 1'b1;
        puf_active <= 1'b0;
        puf_req    <= 1'b0;
      end
    end
  end

  assign ex_run            = trng_on && !puf_req;
  assign ex_nclk           = puf_active ? nclk_puf : nclk_trng;
  assign ex_ready          = puf_active || packer_ready;
  assign trng_sample_valid = sample_valid && !puf_active;

endmodule
