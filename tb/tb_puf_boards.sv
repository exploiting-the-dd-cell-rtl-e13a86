// tb_puf_boards: PUF statistics over 32 simulated chips (32 arrays of 128
// cells with different device seeds), each evaluated 10 times at the PUF
// setting NCLK = 1152. Reports and checks the mean inter-chip distance
// (ideal 50 %, measured 49.48 %), the mean intra-chip distance to the first
// (golden) response (measured 1.67 %) and the mean bias.
`timescale 1ps/1fs
module tb_puf_boards;

  localparam int N = 128;
  localparam int B = 32;
  localparam int EVALS = 10;
  localparam real TCLK = 2222.0;

  logic r = 1'b1, s = 1'b0;
  logic [N-1:0] q [B];
  int checks = 0, failures = 0;

  for (genvar b = 0; b < B; b++) begin : g_board
    dd_array #(.N_CELLS(N), .DEVICE_SEED(100 + b)) u_dut (.r, .s, .q(q[b]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(TCLK * 200_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] gk [B];
    real inter, intra, bias;
    int pairs;
    #10000;
    intra = 0.0;
    for (int e = 0; e < EVALS; e++) begin
      r = 1; #(TCLK); r = 0; #(TCLK); s = 1; #(TCLK * 1152); s = 0; #(TCLK);
      for (int b = 0; b < B; b++) begin
        if (e == 0) gk[b] = q[b];
        else intra += real'($countones(q[b] ^ gk[b])) / N;
      end
    end
    intra = 100.0 * intra / (B * (EVALS - 1));
    inter = 0.0; pairs = 0; bias = 0.0;
    for (int i = 0; i < B; i++) begin
      bias += real'($countones(gk[i])) / N;
      for (int j = i + 1; j < B; j++) begin
        inter += real'($countones(gk[i] ^ gk[j])) / N;
        pairs++;
      end
    end
    inter = 100.0 * inter / pairs;
    bias = bias / B;
    $display("32 chips: inter %5.2f %%  intra %5.2f %%  bias %5.3f", inter, intra, bias);
    check(inter > 45.0 && inter < 55.0, "inter-chip distance near 50 %");
    check(intra < 5.0, "intra-chip distance below 5 %");
    check(bias > 0.42 && bias < 0.58, "bias near 0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
