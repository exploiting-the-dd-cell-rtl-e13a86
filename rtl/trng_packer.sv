// trng_packer: packs variable-width TRNG samples into bytes.
//
// Takes one combined sample of `nbits` bits (1..N_CELLS, in the low bits of
// `din`) per `in_valid` and emits it LSB first as a byte stream with a
// valid/ready handshake. Bits are appended above the bits still held, so the
// byte stream is the concatenation of the samples in arrival order. One byte
// leaves per cycle while the consumer is ready; a sample can arrive in the
// same cycle.
//
// `in_ready` (fewer than 8 bits held) is a start permission, not a per-cycle
// handshake: the excitation sequencer checks it before it starts the race
// whose sample arrives NCLK+1 cycles later. At that moment the previous
// sample may be arriving too, so the staging register holds 2*N_CELLS+8 bits:
// room for the leftover bits, one sample in flight and the new one. A sample
// that would not fit is an error (assertion). This block is this design's
// own glue between the XOR combiner and the byte FIFO.
`timescale 1ps/1fs
module trng_packer #(
  parameter int unsigned N_CELLS = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_CELLS-1:0]            din,
  input  logic [$clog2(N_CELLS+1)-1:0]  nbits,
  input  logic                          in_valid,
  output logic                          in_ready,
  output logic [7:0]                    out_byte,
  output logic                          out_valid,
  input  logic                          out_ready
);

  localparam int unsigned SW = 2 * N_CELLS + 8;
  localparam int unsigned CW = $clog2(SW + 1);

  logic [SW-1:0] stage, base;
  logic [CW-1:0] count, cbase;
  logic          out_fire;

  assign in_ready  = (count < CW'(8));
  assign out_valid = (count >= CW'(8));
  assign out_byte  = stage[7:0];
  assign out_fire  = out_valid && out_ready;
  assign base      = out_fire ? (stage >> 8) : stage;
  assign cbase     = out_fire ? (count - CW'(8)) : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      count <= '0;
    end else if (in_valid) begin
      stage <= base | (SW'(din) << cbase);
      count <= cbase + CW'(nbits);
    end else begin
      stage <= base;
      count <= cbase;
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid |-> (int'(cbase) + int'(nbits) <= SW));

endmodule
