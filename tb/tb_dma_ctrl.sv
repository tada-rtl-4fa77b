// tb_dma_ctrl: connects the DMA to a reference byte memory and to a model of
// the SPI holding register. A write transfer stores a burst of received bytes
// at the programmed address; a read transfer hands bytes to the holding
// register only when it is empty, in order, and stops after len bytes; stop
// ends a transfer at once.
module tb_dma_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, dir = 1'b0, stop = 1'b0, busy;
  logic [7:0] addr = '0;
  logic [15:0] len = '0;
  logic rx_valid = 1'b0, tx_empty, tx_wr;
  logic [7:0] rx_data = '0, tx_data;
  logic nvm_we, nvm_re;
  logic [7:0] nvm_waddr, nvm_raddr, nvm_wdata, nvm_rdata;
  byte unsigned mem [256];
  logic hold_v = 1'b0;
  byte unsigned handed[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dma_ctrl #(.ADDR_W(8), .LEN_W(16)) dut (.*);

  // memory with one-cycle read
  always @(posedge clk) begin
    if (nvm_we) mem[nvm_waddr] <= nvm_wdata;
    if (nvm_re) nvm_rdata <= mem[nvm_raddr];
  end
  // holding register, emptied by the test
  assign tx_empty = !hold_v;
  always @(posedge clk) begin
    if (tx_wr && rst_n) begin
      check(!hold_v, "DMA writes only an empty holding register");
      hold_v <= 1'b1;
      handed.push_back(tx_data);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic go(input bit d, input int a, input int n);
    @(negedge clk);
    start = 1'b1; dir = d; addr = 8'(a); len = 16'(n);
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned exp[$];
    for (int i = 0; i < 256; i++) mem[i] = 8'(i ^ 8'h5A);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // write 10 bytes at 40, spaced like SPI bytes
    go(1'b0, 40, 10);
    check(busy, "busy after start");
    for (int i = 0; i < 12; i++) begin
      repeat (3) @(negedge clk);
      rx_valid = 1'b1; rx_data = 8'(8'hC0 + i);
      @(negedge clk);
      rx_valid = 1'b0;
    end
    for (int i = 0; i < 10; i++) check(mem[40 + i] == 8'(8'hC0 + i), $sformatf("written byte %0d", i));
    check(mem[50] == 8'(50 ^ 8'h5A), "nothing written past len");
    check(!busy, "idle after write");
    // read 10 bytes from 40 through the holding register
    go(1'b1, 40, 10);
    for (int i = 0; i < 40; i++) begin
      repeat (4) @(negedge clk);
      hold_v = 1'b0;             // SPI controller takes the byte
    end
    check(handed.size() == 10, $sformatf("10 bytes handed over, got %0d", handed.size()));
    for (int i = 0; i < 10 && i < handed.size(); i++)
      check(handed[i] == 8'(8'hC0 + i), $sformatf("read byte %0d", i));
    check(!busy, "idle after read");
    // stop a read after a few bytes
    handed.delete();
    go(1'b1, 0, 50);
    for (int i = 0; i < 3; i++) begin
      repeat (4) @(negedge clk);
      hold_v = 1'b0;
    end
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    check(!busy, "stop stops the transfer");
    for (int i = 0; i < 10; i++) begin
      repeat (4) @(negedge clk);
      hold_v = 1'b0;
    end
    check(handed.size() <= 4, $sformatf("no bytes after stop (%0d)", handed.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
