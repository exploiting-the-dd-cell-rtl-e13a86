// tb_restart: restart experiment on the full-size PUF+TRNG. The design is
// reset NRESTART times; after each reset the host starts the TRNG, waits
// until the 128-byte FIFO is full, stops it and reads the 1024 bits over SPI.
// A TRNG must not repeat itself from one start-up to the next, so the
// sequences of different restarts must be uncorrelated:
//   - for every pair, the correlation of the +-1 sequences
//     c = sum(a_i * b_i) / 1024 is computed; for independent fair bits it has
//     mean 0 and standard deviation 1/sqrt(1024) = 0.031. The test requires
//     |mean| < 0.01, a standard deviation between 0.02 and 0.045, and no
//     single |c| above 0.2 (6.4 sigma);
//   - every sequence has a bias within 0.5 +- 0.07 (4.5 sigma).
// The cell models keep their noise generators running across resets, as
// physical noise does across power cycles. The reference measurement used
// 1000 restarts; NRESTART = 40 gives 780 pairs and keeps the run short.
`timescale 1ps/1fs
module tb_restart;
  import puf_trng_pkg::*;

  localparam real TCLK = 2222.0;      // 450 MHz
  localparam real TSCK = 40000.0;     // 25 MHz SPI
  localparam int  NRESTART = 40;
  localparam int  NBYTES = FIFO_DEPTH;
  localparam int  NBITS = 8 * NBYTES;

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

  initial begin
    #(TCLK * 5_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  logic [7:0] rd_buf [NBYTES];
  logic [7:0] status_b;
  task automatic spi_cmd(input logic [7:0] cmd, input int n);
    logic [7:0] r;
    ssel_n = 1'b0;
    #(TSCK/2);
    spi_byte(cmd, status_b);
    for (int i = 0; i < n; i++) begin
      spi_byte(8'h00, r);
      rd_buf[i] = r;
    end
    #(TSCK/2);
    ssel_n = 1'b1;
    #(TSCK);
  endtask

  logic [NBITS-1:0] seq [NRESTART];

  initial begin
    status_t st;
    real sum, sum2, c, mean, sd, worst;
    int npairs, ones, agree;
    for (int k = 0; k < NRESTART; k++) begin
      rst_n = 1'b0;
      #(TCLK * (10 + k));
      rst_n = 1'b1;
      #(TCLK * 10);
      spi_cmd(CMD_TRNG_START, 0);
      do begin
        #(TCLK * 200);
        spi_cmd(CMD_NOP, 0);
        st = status_t'(status_b);
      end while (!st.fifo_full);
      spi_cmd(CMD_TRNG_STOP, 0);
      spi_cmd(CMD_TRNG_READ, NBYTES);
      for (int i = 0; i < NBYTES; i++) seq[k][8*i +: 8] = rd_buf[i];
      ones = $countones(seq[k]);
      check(ones > int'(NBITS * 0.43) && ones < int'(NBITS * 0.57),
            $sformatf("restart %0d: %0d ones in %0d bits", k, ones, NBITS));
    end
    sum = 0.0; sum2 = 0.0; worst = 0.0; npairs = 0;
    for (int a = 0; a < NRESTART; a++)
      for (int b = a + 1; b < NRESTART; b++) begin
        agree = NBITS - $countones(seq[a] ^ seq[b]);
        c = real'(2 * agree - NBITS) / NBITS;
        sum += c;
        sum2 += c * c;
        if (c > worst) worst = c;
        if (-c > worst) worst = -c;
        npairs++;
      end
    mean = sum / npairs;
    sd = $sqrt(sum2 / npairs - mean * mean);
    $display("%0d restarts, %0d pairs: correlation mean %8.5f sd %7.4f max |c| %6.3f",
             NRESTART, npairs, mean, sd, worst);
    check(mean < 0.01 && mean > -0.01, "mean correlation near 0");
    check(sd > 0.02 && sd < 0.045, "correlation spread as for independent bits");
    check(worst < 0.2, "no pair strongly correlated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
