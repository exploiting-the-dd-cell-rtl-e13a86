// dd_array: the entropy source, N_CELLS DD-cells built from 4-bit macros.
//
// The measured design places 128 cells in 32 CLBs (64 Slices), all driven by
// one S and one R from the control FSM; their outputs form one 128-bit word
// that is either the PUF response (long S pulse) or raw TRNG bits (short S
// pulse). DEVICE_SEED stands for the silicon: two arrays with different
// seeds behave like two different chips, the same seed like the same chip.
// Timing: q settles some hundred picoseconds after S falls and stays until R.
`timescale 1ps/1fs
module dd_array #(
  parameter int unsigned N_CELLS     = 128,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic               r,
  input  logic               s,
  output logic [N_CELLS-1:0] q
);

  localparam int unsigned N_MACROS = N_CELLS / 4;

  initial assert (N_CELLS % 4 == 0) else $error("N_CELLS must be a multiple of 4");

  for (genvar i = 0; i < N_MACROS; i++) begin : g_macro
    dd_macro4 #(
      .SEED (DEVICE_SEED * 1024 + i)
    ) u_macro (
      .r (r),
      .s (s),
      .q (q[4*i +: 4])
    );
  end

endmodule
