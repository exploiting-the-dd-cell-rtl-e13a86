// tb_xor_combiner: random 128-bit words through every depth 0..7. The
// expected output is computed independently: after r rounds, bit i is the
// XOR of all input bits j with j mod (128 >> r) == i, and bits above
// 128 >> r are zero; `nbits` must be 128 >> r.
`timescale 1ps/1fs
module tb_xor_combiner;

  localparam int N = 128;
  logic [N-1:0] din, dout;
  logic [2:0] rounds;
  logic [7:0] nbits;
  int checks = 0, failures = 0;

  xor_combiner #(.N_CELLS(N), .MAX_ROUNDS(7), .ROUNDS_W(3)) u_dut (.din, .rounds, .dout, .nbits);

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_w;
    int len;
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < N/32; k++) din[32*k +: 32] = $urandom;
      if (t == 0) din = '0;
      if (t == 1) din = '1;
      for (int r = 0; r < 8; r++) begin
        rounds = 3'(r);
        #10;
        len = N >> r;
        exp_w = '0;
        for (int j = 0; j < N; j++) exp_w[j % len] ^= din[j];
        checks++;
        if (dout !== exp_w || int'(nbits) != len) begin
          failures++;
          if (failures < 10) $display("FAIL: rounds %0d din %h dout %h exp %h nbits %0d", r, din, dout, exp_w, nbits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
