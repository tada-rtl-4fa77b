// dma_ctrl: moves the body of a message between the SPI controller and the
// NVM FIFO buffer, so that the memory controller's state machine only sets up
// and closes each transfer instead of handling every byte.
//
// start loads a byte address, a length and a direction.
//  - to NVM (dir = 0): every received SPI byte (rx_valid) is written to the
//    next address until len bytes have been stored.
//  - from NVM (dir = 1): whenever the SPI transmit holding register is empty
//    the next byte is read (one-cycle read latency) and written into it, until
//    len bytes have been handed over. The holding register gives the read a
//    whole SPI byte time.
// stop ends a transfer at once (used when the MCU drops CS_n early). busy is
// high from start until the last byte has been written to NVM or handed to
// the SPI controller. That a DMA engine does this work follows the document;
// its interface and the prefetch through the holding register are this
// design's own.
module dma_ctrl #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned LEN_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // set-up
  input  logic              start,
  input  logic              dir,
  input  logic [ADDR_W-1:0] addr,
  input  logic [LEN_W-1:0]  len,
  input  logic              stop,
  output logic              busy,
  // SPI controller side
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  input  logic              tx_empty,
  output logic              tx_wr,
  output logic [7:0]        tx_data,
  // NVM side
  output logic              nvm_we,
  output logic [ADDR_W-1:0] nvm_waddr,
  output logic [7:0]        nvm_wdata,
  output logic              nvm_re,
  output logic [ADDR_W-1:0] nvm_raddr,
  input  logic [7:0]        nvm_rdata
);

  logic [ADDR_W-1:0] ptr;
  logic [LEN_W-1:0]  left;
  logic              rd, pend;

  wire running = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      left <= '0;
      rd   <= 1'b0;
      pend <= 1'b0;
    end else if (stop) begin
      left <= '0;
      pend <= 1'b0;
    end else if (start) begin
      ptr  <= addr;
      left <= len;
      rd   <= dir;
      pend <= 1'b0;
    end else begin
      pend <= nvm_re;
      if (nvm_we || nvm_re) begin
        ptr  <= ptr + 1'b1;
        left <= left - 1'b1;
      end
    end
  end

  always_comb begin
    nvm_we    = running && !rd && rx_valid && !start && !stop;
    nvm_waddr = ptr;
    nvm_wdata = rx_data;
    nvm_re    = running && rd && !pend && tx_empty && !start && !stop;
    nvm_raddr = ptr;
    tx_wr     = pend && !stop;
    tx_data   = nvm_rdata;
  end

  assign busy = running || pend;

endmodule
