// tb_spi_slave: drives the SPI target as a mode-0 master (SCLK half period 5
// system clocks) and checks every received byte, every byte sent back from
// the holding register, the 0x00 sent when the holding register is empty, and
// the transaction start/end pulses.
module tb_spi_slave;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0;
  logic miso, cs_active, cs_start, cs_end, rx_valid, tx_wr = 1'b0, tx_empty;
  logic [7:0] rx_data, tx_data = '0;
  int checks = 0, failures = 0;
  int n_start = 0, n_end = 0;
  byte unsigned got_rx[$];
  byte unsigned to_send[$];

  always #5 clk = ~clk;

  spi_slave dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input byte unsigned tx, output byte unsigned rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      repeat (5) @(posedge clk);
      sclk  = 1'b1;
      rx[b] = miso;
      repeat (5) @(posedge clk);
      sclk = 1'b0;
    end
  endtask

  // answer side: on each received byte, queue the next reply
  always @(posedge clk) begin
    tx_wr <= 1'b0;
    if (cs_start) n_start <= n_start + 1;
    if (cs_end)   n_end   <= n_end + 1;
    if (rx_valid) begin
      got_rx.push_back(rx_data);
      if (to_send.size() > 0) begin
        tx_wr   <= 1'b1;
        tx_data <= to_send.pop_front();
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned sent[8], back[8], first, exp_reply[7], r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // first reply byte is placed before the transaction opens
    first = 8'hA5;
    tx_data = first;
    tx_wr = 1'b1;
    @(posedge clk);
    tx_wr = 1'b0;
    check(tx_empty == 1'b0, "holding register full after write");
    for (int i = 0; i < 7; i++) begin
      exp_reply[i] = 8'($urandom);
      to_send.push_back(exp_reply[i]);
    end
    cs_n = 1'b0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      sent[i] = 8'($urandom);
      xfer(sent[i], back[i]);
    end
    repeat (5) @(posedge clk);
    cs_n = 1'b1;
    repeat (10) @(posedge clk);
    check(got_rx.size() == 8, $sformatf("8 bytes received, got %0d", got_rx.size()));
    for (int i = 0; i < 8 && i < got_rx.size(); i++)
      check(got_rx[i] == sent[i], $sformatf("rx byte %0d: %h vs %h", i, got_rx[i], sent[i]));
    check(back[0] == first, $sformatf("first MISO byte %h", back[0]));
    // bytes 1..7 carry the replies queued on rx of bytes 0..6
    for (int i = 1; i < 8; i++)
      check(back[i] == exp_reply[i-1], $sformatf("MISO byte %0d: %h vs %h", i, back[i], exp_reply[i-1]));
    // second transaction with nothing to send: MISO carries 0x00
    cs_n = 1'b0;
    repeat (10) @(posedge clk);
    xfer(8'h3C, r);
    check(r == 8'h00, "empty holding register sends 0x00");
    xfer(8'hC3, r);
    check(r == 8'h00, "still 0x00");
    repeat (5) @(posedge clk);
    cs_n = 1'b1;
    repeat (10) @(posedge clk);
    check(got_rx.size() == 10 && got_rx[9] == 8'hC3, "second transaction received");
    check(n_start == 2 && n_end == 2, "two start and two end pulses");
    check(cs_active == 1'b0, "idle after CS_n rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
