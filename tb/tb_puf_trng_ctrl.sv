// tb_puf_trng_ctrl: the control FSM driven through its SPI byte interface,
// with the excitation sequencer, the packer and the FIFO replaced by small
// models. Checks: reset values (PUF NCLK 1152, TRNG NCLK 16, 4 rounds), the
// status byte, argument commands, a PUF evaluation and the 16-byte readout,
// TRNG start/stop, FIFO reads (one pop per byte actually sent), FIFO level,
// and the mode switch: a PUF request while the TRNG runs drops `ex_run`,
// waits for the sequencer to go idle, runs one excitation with the PUF NCLK
// whose sample is kept out of the TRNG path, then resumes the TRNG.
`timescale 1ps/1fs
module tb_puf_trng_ctrl;
  import puf_trng_pkg::*;

  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_byte = 0, tx_byte;
  logic rx_valid = 0, rx_first = 0, tx_load = 0, cs_end = 0;
  logic ex_start, ex_run, ex_ready, ex_busy;
  logic [11:0] ex_nclk;
  logic [N-1:0] sample = '0;
  logic sample_valid = 0;
  logic [2:0] xor_rounds;
  logic trng_sample_valid, packer_ready = 1;
  logic [7:0] fifo_rdata;
  logic fifo_empty, fifo_full, fifo_rd;
  logic [7:0] fifo_level;
  logic puf_active, trng_on;
  int checks = 0, failures = 0;

  puf_trng_ctrl #(.N_CELLS(N)) u_dut (.*);

  always #1111 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- FIFO model
  logic [7:0] fq [$];
  assign fifo_empty = (fq.size() == 0);
  assign fifo_full  = (fq.size() == FIFO_DEPTH);
  assign fifo_level = 8'(fq.size());
  assign fifo_rdata = fifo_empty ? 8'h00 : fq[0];
  always @(posedge clk) if (fifo_rd) begin
    check(!fifo_empty, "no pop when empty");
    void'(fq.pop_front());
  end

  // ---------------- excitation model: NCLK+2 cycles per excitation
  logic [N-1:0] puf_word;
  int last_puf_nclk = 0, ex_left = 0, n_exc = 0, n_trng_samples = 0, n_puf_samples = 0, last_nclk = 0;
  bit ex_is_puf;
  assign ex_busy = (ex_left > 0);
  always @(posedge clk) begin
    sample_valid <= 1'b0;
    if (!rst_n) begin
      ex_left <= 0;
    end else if (ex_left > 0) begin
      ex_left <= ex_left - 1;
      if (ex_left == 1) begin
        sample_valid <= 1'b1;
        sample <= ex_is_puf ? puf_word : {N/32{$urandom}};
      end
    end else if (ex_start || (ex_run && ex_ready)) begin
      ex_left   <= int'(ex_nclk) + 2;
      last_nclk <= int'(ex_nclk);
      if (puf_active) last_puf_nclk <= int'(ex_nclk);
      ex_is_puf <= puf_active;
      n_exc++;
    end
    if (trng_sample_valid) n_trng_samples++;
    if (sample_valid && !trng_sample_valid) n_puf_samples++;
    if (rst_n) check(!(ex_start && ex_busy), "no start while the sequencer is busy");
  end

  // ---------------- byte interface driver
  logic [7:0] got [$];
  task automatic xfer(input logic [7:0] b, input bit first);
    @(posedge clk); tx_load <= 1;
    @(posedge clk); tx_load <= 0; got.push_back(tx_byte);
    repeat (6) @(posedge clk);
    rx_byte <= b; rx_first <= first; rx_valid <= 1;
    @(posedge clk); rx_valid <= 0;
    repeat (6) @(posedge clk);
  endtask
  task automatic trans(input logic [7:0] cmd, input int n, input logic [7:0] a0 = 0, input logic [7:0] a1 = 0);
    got.delete();
    xfer(cmd, 1);
    for (int i = 0; i < n; i++) xfer((i == 0) ? a0 : (i == 1) ? a1 : 8'h00, 0);
    // the sender loads one more byte at the end, not transmitted
    @(posedge clk); tx_load <= 1; @(posedge clk); tx_load <= 0;
    @(posedge clk); cs_end <= 1; @(posedge clk); cs_end <= 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    #(2222.0 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    status_t s0;
    int n0, np;
    for (int k = 0; k < N/32; k++) puf_word[32*k +: 32] = $urandom;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);

    check(ex_nclk == 12'd16 && xor_rounds == 3'd4 && !ex_run, "reset values");
    trans(CMD_NOP, 0);
    s0 = status_t'(got[0]);
    check(s0.xor_rounds == 3'd4 && s0.fifo_empty && !s0.trng_on && !s0.puf_valid, "status byte");

    // PUF with default NCLK
    trans(CMD_PUF_EVAL, 0);
    repeat (1300) @(posedge clk);
    check(last_puf_nclk == 1152, $sformatf("PUF NCLK %0d", last_puf_nclk));
    trans(CMD_NOP, 0);
    s0 = status_t'(got[0]);
    check(s0.puf_valid, "PUF result valid");
    trans(CMD_PUF_READ, 16);
    for (int k = 0; k < 16; k++) check(got[k+1] == puf_word[8*k +: 8], $sformatf("PUF byte %0d", k));
    check(n_trng_samples == 0, "PUF sample kept out of the TRNG path");

    // arguments
    trans(CMD_SET_NCLK_P, 2, 8'h00, 8'd40);
    trans(CMD_SET_NCLK_T, 2, 8'h00, 8'd9);
    trans(CMD_SET_XOR, 1, 8'd6);
    check(xor_rounds == 3'd6, "XOR rounds written");
    check(ex_nclk == 12'd9, "TRNG NCLK written");

    // TRNG
    trans(CMD_TRNG_START, 0);
    check(ex_run && trng_on, "TRNG running");
    repeat (200) @(posedge clk);
    check(n_trng_samples > 10 && last_nclk == 9, "TRNG excitations with TRNG NCLK");
    // back-pressure reaches the sequencer
    packer_ready = 0;
    repeat (30) @(posedge clk);
    n0 = n_exc;
    repeat (100) @(posedge clk);
    check(n_exc == n0, "no TRNG excitation while the packer is full");
    packer_ready = 1;

    // mode switch
    n0 = n_trng_samples; np = n_puf_samples;
    for (int k = 0; k < N/32; k++) puf_word[32*k +: 32] = $urandom;
    trans(CMD_PUF_EVAL, 0);
    check(!ex_run, "TRNG paused by the PUF request");
    repeat (80) @(posedge clk);
    check(n_puf_samples == np + 1 && last_puf_nclk == 40, "one PUF excitation with the PUF NCLK");
    check(ex_run, "TRNG resumed");
    trans(CMD_PUF_READ, 16);
    for (int k = 0; k < 16; k++) check(got[k+1] == puf_word[8*k +: 8], $sformatf("PUF byte %0d after switch", k));

    // FIFO reads
    trans(CMD_TRNG_STOP, 0);
    check(!ex_run && !trng_on, "TRNG stopped");
    fq.delete();
    for (int k = 0; k < 10; k++) fq.push_back(8'(k * 17 + 3));
    trans(CMD_FIFO_LEVEL, 1);
    check(got[1] == 8'd10, "FIFO level");
    trans(CMD_TRNG_READ, 4);
    for (int k = 0; k < 4; k++) check(got[k+1] == 8'(k * 17 + 3), $sformatf("FIFO byte %0d", k));
    check(fq.size() == 6, $sformatf("four pops, %0d left", fq.size()));
    trans(CMD_TRNG_READ, 8);
    for (int k = 0; k < 6; k++) check(got[k+1] == 8'((k + 4) * 17 + 3), "FIFO byte, second read");
    check(got[7] == 8'h00 && got[8] == 8'h00 && fq.size() == 0, "zero when empty");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
