// tb_nclk_sweep: characterisation of one 128-cell array against the sampling
// time NCLK (S-high time in 2.22 ns cycles), the experiment behind the
// choice of the TRNG and PUF settings. For each NCLK the array is excited
// ITER times and the testbench counts unstable cells (cells that returned
// both values), the mean bias and the mean intra distance to the first
// response. Expected shape (checked below):
//   - NCLK = 1: the cells have had about two loop periods, their duty cycles
//     have hardly moved, so responses barely differ (intra < 10 %);
//   - a short NCLK (at most 32 cycles) gives the largest intra distance, at
//     least 20 %: the cells are sampled in mid-oscillation (TRNG zone);
//   - at NCLK = 16, the TRNG setting, the bias is within 0.05 of one half and
//     the intra distance is at least 10 %;
//   - at NCLK = 1152, the PUF setting, the cells have settled: the intra
//     distance is below 5 % and under a third of the peak, and fewer than
//     20 % of the cells flipped at all in ITER evaluations.
// Where exactly the peak falls depends on the model's jitter figures; the
// reference board puts the best TRNG setting at 17 +- 3 cycles.
`timescale 1ps/1fs
module tb_nclk_sweep;

  localparam int N = 128;
  localparam int ITER = 60;
  localparam real TCLK = 2222.0;

  logic r = 1'b1, s = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  dd_array #(.N_CELLS(N), .DEVICE_SEED(7)) u_dut (.r, .s, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(TCLK * 2_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nclk_list [14] = '{1, 2, 4, 6, 8, 12, 16, 20, 24, 32, 48, 64, 256, 1152};
  int uc [14];
  real intra_pc [14], bias [14];

  initial begin
    int best;
    #10000;
    for (int n = 0; n < 14; n++) begin
      logic [N-1:0] seen0, seen1, ref_w;
      int ones, intra;
      seen0 = '0; seen1 = '0; ones = 0; intra = 0;
      for (int it = 0; it < ITER; it++) begin
        r = 1; #(TCLK); r = 0; #(TCLK); s = 1; #(TCLK * nclk_list[n]); s = 0; #(TCLK);
        seen0 |= ~q;
        seen1 |= q;
        ones += $countones(q);
        if (it == 0) ref_w = q;
        else intra += $countones(q ^ ref_w);
      end
      uc[n] = $countones(seen0 & seen1);
      intra_pc[n] = 100.0 * intra / (N * (ITER - 1));
      bias[n] = real'(ones) / (N * ITER);
      $display("NCLK %5d  unstable %5.1f %%  bias %5.3f  intra %5.2f %%",
               nclk_list[n], 100.0 * uc[n] / N, real'(ones) / (N * ITER),
               100.0 * intra / (N * (ITER - 1)));
    end
    best = 0;
    for (int n = 1; n < 14; n++) if (intra_pc[n] > intra_pc[best]) best = n;
    $display("largest intra distance %5.2f %% at NCLK %0d", intra_pc[best], nclk_list[best]);
    check(intra_pc[0] < 10.0, "NCLK 1: responses still nearly identical");
    check(nclk_list[best] <= 32 && intra_pc[best] >= 20.0,
          $sformatf("random zone at short NCLK (peak at %0d)", nclk_list[best]));
    check(bias[6] > 0.45 && bias[6] < 0.55 && intra_pc[6] >= 10.0,
          "NCLK 16: balanced and random");
    check(intra_pc[13] < 5.0 && intra_pc[13] * 3.0 < intra_pc[best],
          "NCLK 1152: settled, far below the peak");
    check(uc[13] * 100 < N * 20, $sformatf("NCLK 1152: %0d cells flipped", uc[13]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
