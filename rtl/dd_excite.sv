// dd_excite: excitation sequencer and sample register for the DD-cell array.
//
// Drives the three-phase sequence every DD-cell needs and captures the array:
//   RESET  1 cycle   R=1 S=0   clears both latches of every cell
//   START  NCLK cyc. R=0 S=1   race; NCLK sets where in the transient the
//                              cells are sampled (short = TRNG, long = PUF)
//   HOLD   1 cycle   R=0 S=0   latches close; outputs settle
//   then the array word is registered into `sample` and `sample_valid` pulses
//   for one cycle; the next RESET starts in that same cycle.
// One excitation therefore takes NCLK+2 cycles of clk (the 450 MHz clock).
// NCLK = 0 is treated as 1.
//
// `start` runs one excitation; `run` keeps excitations going back to back.
// Before leaving RESET the sequencer waits for `ready` (the consumer can take
// the next sample), keeping R high meanwhile: that is the only stall. The
// value of `nclk` is taken when START is entered. If `run` drops while the
// sequencer is stalled, it returns to IDLE without another excitation.
//
// The phases and NCLK come from the document (S-high time counted in cycles
// of the 450 MHz clock, 1152 for the PUF, about 16 for the TRNG). The one
// cycle RESET and HOLD phases and the stall are this design's choice.
// R and S are register outputs, so they are glitch free.
`timescale 1ps/1fs
module dd_excite #(
  parameter int unsigned N_CELLS = 128,
  parameter int unsigned NCLK_W  = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,        // one excitation (pulse)
  input  logic               run,          // continuous excitations (level)
  input  logic [NCLK_W-1:0]  nclk,         // S-high time in clk cycles
  input  logic               ready,        // consumer can accept a sample
  output logic               dd_r,
  output logic               dd_s,
  input  logic [N_CELLS-1:0] cells,        // array outputs
  output logic [N_CELLS-1:0] sample,
  output logic               sample_valid,
  output logic               busy,
  output logic               stalled       // waiting in RESET for `ready`
);

  typedef enum logic [1:0] {S_IDLE, S_RESET, S_START, S_HOLD} state_e;

  state_e            state;
  logic [NCLK_W-1:0] cnt;
  logic              pending;   // a single excitation was requested

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      pending      <= 1'b0;
      dd_r         <= 1'b1;
      dd_s         <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (start) pending <= 1'b1;
      unique case (state)
        S_IDLE: begin
          dd_r <= 1'b1;
          dd_s <= 1'b0;
          if (start || pending || run) state <= S_RESET;
        end
        S_RESET: begin
          if (!(run || pending || start)) begin
            state <= S_IDLE;              // request withdrawn while stalled
          end else if (ready) begin
            dd_r    <= 1'b0;
            dd_s    <= 1'b1;
            pending <= 1'b0;
            cnt     <= (nclk == '0) ? NCLK_W'(1) : nclk;
            state   <= S_START;
          end
        end
        S_START: begin
          if (cnt == NCLK_W'(1)) begin
            dd_s  <= 1'b0;
            state <= S_HOLD;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_HOLD: begin
          sample       <= cells;
          sample_valid <= 1'b1;
          dd_r         <= 1'b1;
          state        <= (run || pending || start) ? S_RESET : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign stalled = (state == S_RESET) && !ready;

  // S and R are never high together.
  a_rs_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(dd_r && dd_s));

endmodule
