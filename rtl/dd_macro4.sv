// dd_macro4: the 4-bit DD-cell macro that fills one CLB.
//
// A 7-series CLB has two Slices; each Slice holds two DD-cells (two LUTs as
// inverters plus two flip-flops used as latches per cell), so one CLB gives
// four bits. All four cells share the excitation signals R and S.
//
// The routing of the placed macro was matched by hand; the remaining
// nominal delay difference of each cell's two cross connections is taken
// from the published routing-delay table and passed to each cell model as
// DT_NOM_PS:
//   cell 0 (upper Slice, A/D pair):  456 - 457 = -1 ps
//   cell 1 (upper Slice, B/C pair):  486 - 485 = +1 ps
//   cell 2 (lower Slice, A/D pair):  691 - 686 = +5 ps
//   cell 3 (lower Slice, B/C pair):  492 - 494 = -2 ps
// The magnitudes are the published ones; the sign (which connection counts
// as the "second" branch) is this design's choice. SEED gives each cell its
// own random process mismatch in the model. Combinational: q follows the
// cells with their internal delays.
`timescale 1ps/1fs
module dd_macro4 #(
  parameter int unsigned SEED = 1
) (
  input  logic       r,
  input  logic       s,
  output logic [3:0] q
);

  localparam real DT_NOM [4] = '{-1.0, 1.0, 5.0, -2.0};

  for (genvar k = 0; k < 4; k++) begin : g_cell
    dd_cell #(
      .SEED      (SEED * 4 + k),
      .DT_NOM_PS (DT_NOM[k])
    ) u_cell (
      .r (r),
      .s (s),
      .q (q[k])
    );
  end

endmodule
