// mcu_spi_model: testbench model of the SPI side of one attached MCU, i.e. of
// the driver behind push(), pull() and status(). It is the SPI master of its
// own link: mode 0, MSB first, SCLK half period HALF system clocks, and a
// CS_n set-up time of 2*HALF clocks before the first edge. The tasks build the
// transaction frames of the interconnect and return what came back on MISO.
module mcu_spi_model #(
  parameter int unsigned HALF = 5
) (
  input  logic clk,
  output logic sclk,
  output logic cs_n,
  output logic mosi,
  input  logic miso
);
  import tada_pkg::*;

  initial begin
    sclk = 1'b0;
    cs_n = 1'b1;
    mosi = 1'b0;
  end

  task automatic wait_clk(int unsigned n);
    repeat (n) @(posedge clk);
  endtask

  task automatic open_tx();
    cs_n = 1'b0;
    wait_clk(2 * HALF);
  endtask

  task automatic close_tx();
    wait_clk(HALF);
    cs_n = 1'b1;
    wait_clk(4 * HALF);
  endtask

  task automatic xfer(input byte unsigned tx, output byte unsigned rx);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      wait_clk(HALF);
      sclk  = 1'b1;
      rx[b] = miso;
      wait_clk(HALF);
      sclk = 1'b0;
    end
  endtask

  // push: returns the result byte; n_sent < len cuts the transfer short
  task automatic push(input byte unsigned data[$], output byte unsigned res,
                      input int n_sent = -1);
    byte unsigned r;
    int unsigned len = data.size();
    int unsigned n   = (n_sent < 0) ? len : n_sent;
    open_tx();
    xfer({OP_PUSH, 6'd0}, r);
    xfer(8'(len >> 8), r);
    xfer(8'(len), r);
    for (int unsigned i = 0; i < n; i++) xfer(data[i], r);
    res = 8'h00;
    if (n == len) xfer(8'h00, res);
    close_tx();
  endtask

  // pull: n_recv < len cuts the transfer short
  task automatic pull(input byte unsigned id, input int unsigned len,
                      output byte unsigned res, output byte unsigned data[$],
                      input int n_recv = -1);
    byte unsigned r;
    int unsigned n = (n_recv < 0) ? len : n_recv;
    data.delete();
    open_tx();
    xfer({OP_PULL, id[5:0]}, r);
    xfer(8'(len >> 8), r);
    xfer(8'(len), r);
    xfer(8'h00, res);
    for (int unsigned i = 0; i < n; i++) begin
      xfer(8'h00, r);
      data.push_back(r);
    end
    close_tx();
  endtask

  task automatic status(input byte unsigned id, output byte unsigned flags,
                        output int unsigned count);
    byte unsigned r, hi, lo;
    open_tx();
    xfer({OP_STATUS, id[5:0]}, r);
    xfer(8'h00, flags);
    xfer(8'h00, hi);
    xfer(8'h00, lo);
    close_tx();
    count = {hi, lo};
  endtask

endmodule
