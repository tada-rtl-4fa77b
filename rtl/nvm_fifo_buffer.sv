// nvm_fifo_buffer: the non-volatile byte store that holds every queued
// message. In the prototype this is the 64 KB of FRAM built into the
// interconnect MCU; here it is a byte-wide memory array with one write port
// and one read port and a one-cycle registered read. Its contents are never
// cleared by reset: a power failure resets the control logic but leaves the
// stored messages in place, which is what lets producers and consumers run at
// different times. In silicon the array would be an FRAM (or other NVM) macro
// with the same ports; its write-endurance and power-down timing are outside
// this model. The size (64 KB) follows the document; the port structure is
// this design's own.
module nvm_fifo_buffer #(
  parameter int unsigned BYTES  = 65536,
  parameter int unsigned ADDR_W = $clog2(BYTES)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [7:0]        wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [7:0]        rdata
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
