// sync_fifo: single-clock FIFO holding the TRNG output bytes.
//
// First-word-fall-through: `rdata` shows the oldest entry whenever `empty`
// is low, and `rd` removes it. DEPTH entries of WIDTH bits in a memory
// array with wrap-around pointers one bit wider than the address. `level`
// is the number of entries held. A write when full or a read when empty is
// ignored and flagged by an assertion. The default 128 x 8 bits holds 1024
// bits, the sequence length the TRNG data are read out in; the document
// names a FIFO but gives no size, so the size is this design's choice.
`timescale 1ps/1fs
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       rd,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign level = ($clog2(DEPTH+1))'(wptr - rptr);
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty));

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

endmodule
