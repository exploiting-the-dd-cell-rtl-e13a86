// tb_dd_cell: checks the DD-cell model against the excitation rules and the
// duty-cycle law. Cells with a fixed, known mismatch (no random mismatch):
//  - reset forces q to 0;
//  - a long S pulse gives q = 1 for dT > 0 and q = 0 for dT < 0 (PUF zone);
//  - with dT = +20 ps and T = 1 ns the duty cycle 1/2 + M*dT/T reaches 1 at
//    M = 25 periods: the output must still toggle during the first 20 ns and
//    must be constant after 30 ns;
//  - the latched value holds while S is low;
//  - a matched cell (dT = 0) sampled early (TRNG zone) returns both values.
`timescale 1ps/1fs
module tb_dd_cell;

  logic r = 1'b1, s = 1'b0;
  logic qp, qn, q0;
  int checks = 0, failures = 0;

  dd_cell #(.SEED(11), .DT_NOM_PS( 20.0), .MISMATCH_SIGMA_PS(0.0)) u_pos (.r, .s, .q(qp));
  dd_cell #(.SEED(12), .DT_NOM_PS(-20.0), .MISMATCH_SIGMA_PS(0.0)) u_neg (.r, .s, .q(qn));
  dd_cell #(.SEED(13), .DT_NOM_PS(  0.0), .MISMATCH_SIGMA_PS(0.0)) u_zero(.r, .s, .q(q0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int toggles_early, toggles_late;
  logic prev;

  initial begin
    #(50_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    #10000;
    check(qp == 0 && qn == 0 && q0 == 0, "reset clears the cells");

    // long excitation: PUF zone
    r = 0; #1000; s = 1;
    toggles_early = 0; prev = qp;
    for (int t = 0; t < 2000; t++) begin #10; if (qp != prev) toggles_early++; prev = qp; end  // 0..20 ns
    check(toggles_early > 10, $sformatf("cell oscillates in the TRNG zone (%0d edges)", toggles_early));
    #10000;                                                                                  // to 30 ns
    toggles_late = 0; prev = qp;
    for (int t = 0; t < 2000; t++) begin #10; if (qp != prev) toggles_late++; prev = qp; end
    check(toggles_late == 0, "cell has settled after 30 ns");
    #2_000_000;
    s = 0; #1000;
    check(qp == 1, "dT > 0 settles to 1");
    check(qn == 0, "dT < 0 settles to 0");
    #100_000;
    check(qp == 1 && qn == 0, "outputs hold while S is low");
    r = 1; #1000;
    check(qp == 0 && qn == 0, "R clears the latched bits");

    // short excitations of the matched cell: random bits
    ones = 0;
    for (int k = 0; k < 200; k++) begin
      r = 1; #4444; r = 0; #2222; s = 1; #(16 * 2222); s = 0; #2222;
      ones += q0;
    end
    check(ones > 10 && ones < 190, $sformatf("matched cell sampled early gives both values (%0d/200)", ones));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
