// tb_spi_slave: an SPI mode-0 master at 25 MHz (SCK) against the target
// clocked at 450 MHz. Random transactions of 1..6 bytes: every byte sent on
// MOSI must come out on rx_byte in order with rx_first on the first byte of
// each transaction, every byte offered on tx_byte must arrive on MISO in
// order (the testbench offers a new byte after each tx_load), and each
// transaction end gives one cs_end pulse.
`timescale 1ps/1fs
module tb_spi_slave;

  localparam real TSCK = 40000.0;
  logic clk = 0, rst_n = 0;
  logic sck = 0, mosi = 0, ssel_n = 1, miso;
  logic [7:0] rx_byte, tx_byte;
  logic rx_valid, rx_first, tx_load, cs_end;
  int checks = 0, failures = 0;

  spi_slave u_dut (.clk, .rst_n, .sck, .mosi, .ssel_n, .miso,
                   .rx_byte, .rx_valid, .rx_first, .tx_byte, .tx_load, .cs_end);

  always #1111 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [7:0] sent [$];      // MOSI bytes, with first-flag below
  bit         sent_first [$];
  logic [7:0] offered [$];   // tx bytes handed to the target, in load order
  int n_cs_end = 0;

  // target side: collect rx bytes, offer a new tx byte after every load
  always @(posedge clk) begin
    if (rx_valid) begin
      check(sent.size() > 0, "rx byte expected");
      if (sent.size() > 0) begin
        check(rx_byte == sent.pop_front(), "MOSI byte received");
        check(rx_first == sent_first.pop_front(), "rx_first flag");
      end
    end
    if (tx_load) begin
      offered.push_back(tx_byte);
      tx_byte <= 8'($urandom);
    end
    if (cs_end) n_cs_end++;
  end

  initial begin
    #(1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_tr;
    tx_byte = 8'h5A;
    #10000 rst_n = 1;
    #10000;
    n_tr = 40;
    for (int t = 0; t < n_tr; t++) begin
      int nb;
      nb = $urandom_range(1, 6);
      ssel_n = 0;
      #(TSCK/2);
      for (int k = 0; k < nb; k++) begin
        logic [7:0] b, r;
        b = 8'($urandom);
        sent.push_back(b);
        sent_first.push_back(k == 0);
        for (int i = 7; i >= 0; i--) begin
          mosi = b[i];
          #(TSCK/2);
          sck = 1;
          r[i] = miso;
          #(TSCK/2);
          sck = 0;
        end
        check(offered.size() > 0, "a tx byte was loaded for this byte slot");
        if (offered.size() > 0) check(r == offered.pop_front(), $sformatf("MISO byte %02h", r));
      end
      #(TSCK/2);
      ssel_n = 1;
      #(TSCK);
      // the load after the last byte of a transaction is not transmitted
      offered.delete();
    end
    #(TSCK);
    check(n_cs_end == n_tr, $sformatf("cs_end pulses %0d", n_cs_end));
    check(sent.size() == 0, "all MOSI bytes delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
