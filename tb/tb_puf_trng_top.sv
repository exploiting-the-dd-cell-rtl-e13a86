// tb_puf_trng_top: end-to-end test of the PUF+TRNG at full size (128 cells,
// default NCLK values, 128-byte FIFO), driven only through SPI as a host
// would drive it.
//
// Sequence: status after reset; PUF evaluation (S-high time must be 1152
// cycles) and readout, compared bit by bit with the sign of every cell
// model's mismatch; a second evaluation for the intra-distance; TRNG running
// until the FIFO fills (back-pressure stall), excitation period NCLK+2 = 18
// cycles, every byte read back compared with an independent XOR fold of the
// raw samples; a PUF evaluation while the TRNG runs (mode switch); other
// XOR-round and NCLK settings; stop. Each mechanism is counted and a
// mechanism that never happened is a failure.
`timescale 1ps/1fs
module tb_puf_trng_top;
  import puf_trng_pkg::*;

  localparam real TCLK = 2222.0;      // 450 MHz
  localparam real TSCK = 40000.0;     // 25 MHz SPI

  logic clk = 1'b0, rst_n = 1'b0;
  logic sck = 1'b0, mosi = 1'b0, ssel_n = 1'b1, miso;
  logic trng_on, puf_busy, stalled;

  int checks = 0, failures = 0;

  puf_trng_top u_top (
    .clk_h (clk), .rst_n, .sck, .mosi, .ssel_n, .miso,
    .trng_on, .puf_busy, .stalled
  );

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ SPI master
  task automatic spi_byte(input logic [7:0] tx, output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      #(TSCK/2);
      sck = 1'b1;
      rx[b] = miso;
      #(TSCK/2);
      sck = 1'b0;
    end
  endtask

  // One transaction: command + n further bytes (args, or zeros when reading).
  logic [7:0] rd_buf [256];
  logic [7:0] status_b;
  task automatic spi_cmd(input logic [7:0] cmd, input int n,
                         input logic [7:0] a0 = 8'h00, input logic [7:0] a1 = 8'h00);
    logic [7:0] r;
    ssel_n = 1'b0;
    #(TSCK/2);
    spi_byte(cmd, status_b);
    for (int i = 0; i < n; i++) begin
      spi_byte((i == 0) ? a0 : (i == 1) ? a1 : 8'h00, r);
      rd_buf[i] = r;
    end
    #(TSCK/2);
    ssel_n = 1'b1;
    #(TSCK);
  endtask

  function automatic status_t st();
    return status_t'(status_b);
  endfunction

  // --------------------------------------------- reference of the PUF bits
  real dts [N_DD_CELLS];
  for (genvar i = 0; i < N_DD_CELLS; i++) begin : g_dt
    assign dts[i] = u_top.u_array.g_macro[i/4].u_macro.g_cell[i%4].u_cell.dt_cell;
  end

  // --------------------------------------------------- monitors / counters
  int s_high_run = 0, last_s_high = 0;
  int n_samples = 0, last_sample_cyc = 0, min_period = 1 << 30, max_period = 0;
  int n_stall_cycles = 0, n_mode_switch = 0, n_puf_exc = 0, n_trng_exc = 0;
  int cyc = 0;
  bit measure_period = 0;
  logic prev_s = 0;

  // independent model of the TRNG byte stream
  bit bitq [$];
  logic [7:0] exp_bytes [$];

  always @(posedge clk) begin
    cyc++;
    if (u_top.u_excite.dd_s) s_high_run++;
    else if (prev_s) begin last_s_high = s_high_run; s_high_run = 0; end
    prev_s = u_top.u_excite.dd_s;
    if (stalled) n_stall_cycles++;
    if (u_top.u_excite.sample_valid) begin
      if (puf_busy) n_puf_exc++;
      else begin
        logic [N_DD_CELLS-1:0] w;
        int len;
        n_trng_exc++;
        if (trng_on && puf_busy == 0 && measure_period && n_samples > 0) begin
          if (cyc - last_sample_cyc < min_period) min_period = cyc - last_sample_cyc;
          if (cyc - last_sample_cyc > max_period) max_period = cyc - last_sample_cyc;
        end
        n_samples++;
        last_sample_cyc = cyc;
        // fold: bit i after r rounds = XOR of all cells j with j mod len == i
        len = N_DD_CELLS >> u_top.u_ctrl.xor_rounds;
        w = '0;
        for (int j = 0; j < N_DD_CELLS; j++) w[j % len] ^= u_top.u_excite.sample[j];
        for (int i = 0; i < len; i++) bitq.push_back(w[i]);
        while (bitq.size() >= 8) begin
          logic [7:0] by;
          for (int k = 0; k < 8; k++) by[k] = bitq.pop_front();
          exp_bytes.push_back(by);
        end
      end
    end
  end

  // watchdog
  initial begin
    #(TCLK * 400000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------------- helpers
  logic [N_DD_CELLS-1:0] resp1, resp2, resp3;
  int n_bytes_checked = 0, ones = 0, nbits_seen = 0;

  task automatic puf_eval_read(output logic [N_DD_CELLS-1:0] resp);
    spi_cmd(CMD_PUF_EVAL, 0);
    do begin
      #(TCLK * 200);
      spi_cmd(CMD_NOP, 0);
    end while (!st().puf_valid);
    spi_cmd(CMD_PUF_READ, N_DD_CELLS/8);
    for (int k = 0; k < N_DD_CELLS/8; k++) resp[8*k +: 8] = rd_buf[k];
  endtask

  task automatic drain_and_check(input int max_bytes);
    int lvl, n;
    spi_cmd(CMD_FIFO_LEVEL, 1);
    lvl = rd_buf[0];
    check(lvl == int'(u_top.u_fifo.level) || lvl + 1 == int'(u_top.u_fifo.level)
          || lvl == int'(u_top.u_fifo.level) + 1, "FIFO_LEVEL matches the FIFO");
    n = (lvl < max_bytes) ? lvl : max_bytes;
    spi_cmd(CMD_TRNG_READ, n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] e;
      e = exp_bytes.pop_front();
      check(rd_buf[i] == e, $sformatf("TRNG byte %0d: got %02h expected %02h",
                                      n_bytes_checked, rd_buf[i], e));
      n_bytes_checked++;
      ones += $countones(rd_buf[i]);
      nbits_seen += 8;
    end
  endtask

  function automatic int hd(input logic [N_DD_CELLS-1:0] a, input logic [N_DD_CELLS-1:0] b);
    return $countones(a ^ b);
  endfunction

  // ---------------------------------------------------------------- stimulus
  initial begin
    int mism, stable;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    // reset state
    spi_cmd(CMD_NOP, 0);
    check(st().xor_rounds == 3'(XOR_ROUNDS_DEF), "default XOR rounds = 4");
    check(st().fifo_empty && !st().trng_on && !st().puf_valid, "idle status after reset");

    // ---- PUF
    puf_eval_read(resp1);
    check(last_s_high == NCLK_PUF, $sformatf("PUF S-high time %0d cycles, expected 1152", last_s_high));
    mism = 0; stable = 0;
    for (int i = 0; i < N_DD_CELLS; i++) begin
      if (dts[i] > 6.0 || dts[i] < -6.0) begin
        stable++;
        if (resp1[i] != (dts[i] > 0.0)) mism++;
      end
    end
    check(mism == 0, $sformatf("PUF bits of %0d well-mismatched cells: %0d wrong", stable, mism));
    check(stable > N_DD_CELLS * 3 / 4, "most cells are clearly mismatched");
    check($countones(resp1) > N_DD_CELLS * 3 / 10 && $countones(resp1) < N_DD_CELLS * 7 / 10,
          $sformatf("PUF response bias: %0d ones of 128", $countones(resp1)));
    puf_eval_read(resp2);
    check(hd(resp1, resp2) <= N_DD_CELLS / 20,
          $sformatf("PUF intra-distance %0d bits", hd(resp1, resp2)));

    // ---- TRNG, defaults: NCLK 16, 4 rounds
    measure_period = 1;
    spi_cmd(CMD_TRNG_START, 0);
    #(TCLK * 3000);                       // FIFO (128 B) fills after ~2300 cycles
    check(n_stall_cycles > 0, "FIFO full stalls the excitation");
    check(min_period == NCLK_TRNG + 2 && max_period >= NCLK_TRNG + 2,
          $sformatf("TRNG excitation period min %0d cycles, expected 18", min_period));
    measure_period = 0;
    for (int k = 0; k < 4; k++) drain_and_check(48);

    // ---- mode switch: PUF evaluation while the TRNG runs
    begin
      int n_before;
      n_before = n_puf_exc;
      puf_eval_read(resp3);
      check(n_puf_exc == n_before + 1, "one PUF excitation during TRNG operation");
      check(hd(resp1, resp3) <= N_DD_CELLS / 20,
            $sformatf("PUF response under TRNG operation: distance %0d", hd(resp1, resp3)));
      check(last_s_high == NCLK_PUF, "PUF S-high time after switch");
      n_mode_switch++;
    end
    #(TCLK * 500);
    spi_cmd(CMD_NOP, 0);
    check(st().trng_on, "TRNG resumes after the PUF evaluation");
    for (int k = 0; k < 3; k++) drain_and_check(48);

    // ---- other XOR depth and NCLK
    spi_cmd(CMD_TRNG_STOP, 0);
    #(TCLK * 100);
    drain_and_check(200);                 // empty the FIFO
    drain_and_check(200);
    spi_cmd(CMD_FIFO_LEVEL, 1);
    check(rd_buf[0] == 8'd0, "FIFO empty after draining");
    spi_cmd(CMD_SET_XOR, 1, 8'd7);
    spi_cmd(CMD_SET_NCLK_T, 2, 8'h00, 8'd20);
    spi_cmd(CMD_NOP, 0);
    check(st().xor_rounds == 3'd7, "XOR rounds set to 7");
    begin
      int n0;
      n0 = n_trng_exc;
      min_period = 1 << 30; max_period = 0;
      measure_period = 1;
      spi_cmd(CMD_TRNG_START, 0);
      #(TCLK * 2200);
      measure_period = 0;
      check(min_period == 22, $sformatf("period with NCLK 20: %0d", min_period));
      check(last_s_high == 20, "S-high time follows TRNG NCLK");
      check(n_trng_exc - n0 > 50, "TRNG excitations with 7 rounds");
    end
    for (int k = 0; k < 2; k++) drain_and_check(8);
    spi_cmd(CMD_SET_XOR, 1, 8'd0);        // raw cells, 16 bytes per excitation
    #(TCLK * 600);
    for (int k = 0; k < 3; k++) drain_and_check(40);
    spi_cmd(CMD_TRNG_STOP, 0);
    #(TCLK * 200);
    begin
      int n0;
      n0 = n_trng_exc;
      #(TCLK * 500);
      check(n_trng_exc == n0, "no excitation after TRNG_STOP");
    end

    check(n_bytes_checked >= 300, $sformatf("%0d TRNG bytes checked", n_bytes_checked));
    check(ones * 10 > nbits_seen * 4 && ones * 10 < nbits_seen * 6,
          $sformatf("TRNG bias %0d/%0d", ones, nbits_seen));
    // every mechanism must have happened
    check(n_stall_cycles > 0, "mechanism: back-pressure stall");
    check(n_mode_switch > 0,  "mechanism: PUF/TRNG mode switch");
    check(n_puf_exc >= 3,     "mechanism: PUF excitation");
    check(n_trng_exc > 0,     "mechanism: TRNG excitation");
    $display("mechanisms: puf_exc=%0d trng_exc=%0d stall_cycles=%0d mode_switch=%0d bytes=%0d",
             n_puf_exc, n_trng_exc, n_stall_cycles, n_mode_switch, n_bytes_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
