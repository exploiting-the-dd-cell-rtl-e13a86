// tb_dd_array: two 128-cell arrays with different device seeds stand for two
// chips. Long excitations (PUF zone, 1152 cycles of 2.22 ns): every clearly
// mismatched cell returns the sign of its mismatch, the bias of each response
// is near one half, the two chips differ in about half of the bits (inter
// distance) and repeated evaluations of one chip differ in few (intra).
`timescale 1ps/1fs
module tb_dd_array;

  localparam int N = 128;
  logic r = 1'b1, s = 1'b0;
  logic [N-1:0] qa, qb;
  int checks = 0, failures = 0;

  dd_array #(.N_CELLS(N), .DEVICE_SEED(1)) u_a (.r, .s, .q(qa));
  dd_array #(.N_CELLS(N), .DEVICE_SEED(2)) u_b (.r, .s, .q(qb));

  real dta [N];
  for (genvar i = 0; i < N; i++) begin : g_dt
    assign dta[i] = u_a.g_macro[i/4].u_macro.g_cell[i%4].u_cell.dt_cell;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic excite(input int nclk);
    r = 1; #4444; r = 0; #2222; s = 1; #(nclk * 2222); s = 0; #2222;
  endtask

  initial begin
    #(200_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ga, gb;
    int mism, inter, intra;
    #10000;
    check(qa == '0 && qb == '0, "reset clears the arrays");
    excite(1152);
    ga = qa; gb = qb;
    mism = 0;
    for (int i = 0; i < N; i++)
      if ((dta[i] > 6.0 || dta[i] < -6.0) && ga[i] != (dta[i] > 0.0)) mism++;
    check(mism == 0, $sformatf("%0d clearly mismatched cells disagree with their sign", mism));
    check($countones(ga) > 38 && $countones(ga) < 90, $sformatf("bias chip A %0d/128", $countones(ga)));
    check($countones(gb) > 38 && $countones(gb) < 90, $sformatf("bias chip B %0d/128", $countones(gb)));
    inter = $countones(ga ^ gb);
    check(inter > 40 && inter < 88, $sformatf("inter distance %0d/128", inter));
    intra = 0;
    for (int k = 0; k < 4; k++) begin
      excite(1152);
      intra += $countones(qa ^ ga);
    end
    check(intra <= 4 * 6, $sformatf("intra distance %0d bits over 4 evaluations", intra));
    $display("inter=%0d intra=%0d", inter, intra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
