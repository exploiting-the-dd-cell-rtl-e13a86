// tb_dd_excite: checks the excitation sequence cycle by cycle against an
// independent expectation: R high for the reset cycle, S high for exactly
// NCLK cycles, one hold cycle with both low, the sample equal to the array
// word of the hold cycle, period NCLK+2 in continuous mode, R and S never
// high together, the stall while `ready` is low and the return to idle when
// `run` drops during a stall. The cell array is replaced by a counter.
`timescale 1ps/1fs
module tb_dd_excite;

  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, run = 0, ready = 1;
  logic [11:0] nclk = 12'd5;
  logic dd_r, dd_s, sample_valid, busy, stalled;
  logic [N-1:0] cells = '0, sample;
  int checks = 0, failures = 0;
  int cyc = 0;

  dd_excite #(.N_CELLS(N), .NCLK_W(12)) u_dut (
    .clk, .rst_n, .start, .run, .nclk, .ready, .dd_r, .dd_s,
    .cells, .sample, .sample_valid, .busy, .stalled);

  always #1111 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // monitor: S-high run length, hold cycle, sample, period
  int s_run = 0, last_run = 0, last_valid = -1, period = 0, n_valid = 0;
  logic prev_s = 0;
  logic [N-1:0] hold_word;
  always @(posedge clk) begin
    cyc++;
    cells <= N'(cyc * 7);
    if (rst_n) begin
      check(!(dd_r && dd_s), "R and S never high together");
      if (sample_valid) begin
        check(sample == hold_word, "sample is the array word of the hold cycle");
        if (last_valid >= 0) period = cyc - last_valid;
        last_valid = cyc;
        n_valid++;
      end
      // the cycle just seen is the hold cycle if S fell at its start
      if (prev_s && !dd_s) begin
        check(!dd_r, "hold cycle: R=0 S=0");
        hold_word = cells;
      end
      if (dd_s) s_run++;
      else if (prev_s) begin last_run = s_run; s_run = 0; end
      prev_s = dd_s;
    end
  end

  initial begin
    #(2222 * 20000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(dd_r && !dd_s && !busy, "idle keeps the cells in reset");
    // single excitations with several NCLK
    foreach (nclk_list[i]) begin
      nclk <= nclk_list[i];
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      n0 = n_valid;
      repeat (nclk_list[i] + 10) @(posedge clk);
      check(n_valid == n0 + 1, "one sample per start");
      check(last_run == ((nclk_list[i] == 0) ? 1 : nclk_list[i]),
            $sformatf("S high %0d cycles for NCLK %0d", last_run, nclk_list[i]));
      check(!busy && dd_r, "back to idle in reset");
    end
    // continuous: period NCLK+2
    nclk <= 12'd16;
    run <= 1;
    repeat (200) @(posedge clk);
    check(period == 18, $sformatf("continuous period %0d, expected 18", period));
    check(last_run == 16, "S high 16 cycles");
    // stall
    ready <= 0;
    repeat (40) @(posedge clk);
    n0 = n_valid;
    repeat (100) @(posedge clk);
    check(n_valid == n0, "no sample while not ready");
    check(stalled && dd_r && !dd_s, "stalled in reset");
    ready <= 1;
    repeat (40) @(posedge clk);
    check(n_valid > n0, "resumes when ready");
    // run dropped during a stall
    ready <= 0;
    repeat (40) @(posedge clk);
    run <= 0;
    repeat (5) @(posedge clk);
    check(!busy && !stalled, "withdrawn request returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] nclk_list [5] = '{12'd1, 12'd2, 12'd16, 12'd0, 12'd1152};

endmodule
