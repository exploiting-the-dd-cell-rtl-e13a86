// tb_sync_fifo: random writes and reads (never writing when full nor reading
// when empty) against a queue model: data order, empty/full flags and level.
// Phases bias toward filling and toward draining so both limits are reached.
`timescale 1ps/1fs
module tb_sync_fifo;

  localparam int D = 128;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full;
  logic [7:0] level;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(D)) u_dut (.clk, .rst_n, .wr, .wdata, .rd, .rdata, .empty, .full, .level);

  always #1111 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #(2222 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      int pw;
      @(negedge clk);
      // compare state with the model
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(int'(level) == q.size(), "level");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      pw = ((t / 1000) % 2 == 0) ? 80 : 20;
      wr = !full && ($urandom_range(99) < pw);
      rd = !empty && ($urandom_range(99) < 100 - pw);
      wdata = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(wdata);
    end
    check(n_full > 0 && n_empty > 0, "both full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
