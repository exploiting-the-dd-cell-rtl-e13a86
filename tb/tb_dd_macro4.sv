// tb_dd_macro4: the four cells of one macro share R and S, carry the routing
// mismatch of the placed macro (-1, +1, +5, -2 ps), all four oscillate
// right after S rises, and each settles to the sign of its own total
// mismatch after a long excitation. Repeated excitations give the same word.
`timescale 1ps/1fs
module tb_dd_macro4;

  logic r = 1'b1, s = 1'b0;
  logic [3:0] q;
  int checks = 0, failures = 0;

  dd_macro4 #(.SEED(5)) u_dut (.r, .s, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real dt [4];
  real nom [4];
  assign dt[0] = u_dut.g_cell[0].u_cell.dt_cell;
  assign dt[1] = u_dut.g_cell[1].u_cell.dt_cell;
  assign dt[2] = u_dut.g_cell[2].u_cell.dt_cell;
  assign dt[3] = u_dut.g_cell[3].u_cell.dt_cell;
  assign nom[0] = u_dut.g_cell[0].u_cell.DT_NOM_PS;
  assign nom[1] = u_dut.g_cell[1].u_cell.DT_NOM_PS;
  assign nom[2] = u_dut.g_cell[2].u_cell.DT_NOM_PS;
  assign nom[3] = u_dut.g_cell[3].u_cell.DT_NOM_PS;

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] first;
    #10000;
    check(q == 4'b0000, "reset clears all four cells");
    check(nom[0] == -1.0 && nom[1] == 1.0 && nom[2] == 5.0 && nom[3] == -2.0,
          "routing mismatch of the placed macro");
    // every cell races: its output toggles early in the excitation
    r = 1; #4444; r = 0; #2222; s = 1;
    begin
      int tg [4];
      logic [3:0] pq;
      tg = '{0, 0, 0, 0};
      pq = q;
      for (int t = 0; t < 500; t++) begin
        #10;
        for (int c = 0; c < 4; c++) if (q[c] != pq[c]) tg[c]++;
        pq = q;
      end
      for (int c = 0; c < 4; c++) check(tg[c] >= 4, $sformatf("cell %0d oscillates after S rises (%0d edges)", c, tg[c]));
    end
    s = 0; #2222;
    for (int k = 0; k < 4; k++) begin
      r = 1; #4444; r = 0; #2222; s = 1; #(1152 * 2222); s = 0; #2222;
      for (int c = 0; c < 4; c++)
        if (dt[c] > 6.0 || dt[c] < -6.0)
          check(q[c] == (dt[c] > 0.0), $sformatf("cell %0d (dT %f ps) settles to its sign", c, dt[c]));
      if (k == 0) first = q;
      else
        for (int c = 0; c < 4; c++)
          if (dt[c] > 6.0 || dt[c] < -6.0)
            check(q[c] == first[c], $sformatf("cell %0d: same bit on every evaluation", c));
    end
    r = 1; #2000;
    check(q == 4'b0000, "R clears all four cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
