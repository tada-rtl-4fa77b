// tada_interconnect: a message-passing interconnect that lets tasks running on
// different, separately powered MCUs hand data to each other through
// non-volatile FIFO queues.
//
// Each attached MCU has its own SPI pins and its own GPIO status lines. One
// MCU at a time is served (spi_port_mux); its transactions reach a single SPI
// controller (spi_slave), are decoded by the memory control state machine
// (mem_ctrl_fsm), and message bodies move between SPI and the NVM FIFO buffer
// (nvm_fifo_buffer) through a DMA engine (dma_ctrl). Queue state lives in
// queue_table; status_gpio drives the ready lines and wake-up interrupts.
//
// Queues are fixed at build time by QCFG: one queue per producer/consumer MCU
// pair, each with an item size and a depth, stored back to back in NVM. The
// default is the plant-health-monitoring pipeline: MCU 0 (camera) -> MCU 1
// (inference) with 15 items of 64x64 bytes, and MCU 1 -> MCU 2 (radio) with 15
// items of 4 bytes, 61,500 bytes of the 64 KB NVM.
//
// Reset (rst_n) models the power coming back: it clears the SPI, DMA, state
// machine and GPIO wake flags. fmt empties all queues and is used once when
// the system is first deployed; neither the NVM contents nor the queue
// pointers are touched by rst_n, so queued messages survive energy failures.
// Push and pull commit only after the whole message has crossed the link.
//
// Timing: clk must run at least 10 times faster than any SCLK, and an MCU
// waits at least 8 clk cycles between lowering CS_n and its first SCLK edge.
// The transaction formats are described in mem_ctrl_fsm.
module tada_interconnect
  import tada_pkg::*;
#(
  parameter int unsigned N_MCU     = 3,
  parameter int unsigned N_QUEUES  = 2,
  parameter queue_cfg_t  QCFG [N_QUEUES] = '{qcfg(0, 1, 4096, 15), qcfg(1, 2, 4, 15)},
  parameter int unsigned NVM_BYTES = 65536
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fmt,
  // SPI, one set of pins per MCU
  input  logic [N_MCU-1:0]    spi_sclk,
  input  logic [N_MCU-1:0]    spi_cs_n,
  input  logic [N_MCU-1:0]    spi_mosi,
  output logic [N_MCU-1:0]    spi_miso,
  // GPIO status lines, one set per MCU
  output logic [N_MCU-1:0]    gpio_data_ready,
  output logic [N_MCU-1:0]    gpio_space_ready,
  output logic [N_MCU-1:0]    gpio_wake,
  // observation: items held by each queue, refused SPI transactions
  output logic [LEN_W-1:0]    q_count [N_QUEUES],
  output logic [N_MCU-1:0]    spi_collision,
  // one-cycle pulse when a push or pull has been answered, with its result
  output logic                op_done,
  output res_e                op_res
);

  localparam int unsigned ADDR_W = $clog2(NVM_BYTES);
  localparam int unsigned QW     = (N_QUEUES > 1) ? $clog2(N_QUEUES) : 1;
  localparam int unsigned IDW    = $clog2(N_MCU + 1);

  // port mux <-> SPI controller
  logic            s_sclk, s_cs_n, s_mosi, s_miso, granted, granted_q;
  logic [IDW-1:0]  req_id;
  // SPI controller byte interface
  logic            cs_active, cs_start, cs_end, rx_valid, tx_empty, tx_wr;
  logic [7:0]      rx_data, tx_data;
  // FSM
  logic            f_tx_wr;
  logic [7:0]      f_tx_data;
  logic [5:0]      out_src, in_src, in_dst;
  logic            out_found, out_full, in_found, in_empty;
  logic [QW-1:0]   out_q, in_q, commit_q;
  logic [ADDR_W-1:0] out_tail, in_head;
  logic [LEN_W-1:0]  out_item, in_item, in_count;
  logic            commit_push, commit_pull;
  logic            dma_start, dma_dir, dma_abort, dma_busy;
  logic [ADDR_W-1:0] dma_addr;
  logic [LEN_W-1:0]  dma_len;
  logic            done_push, done_pull;
  res_e            done_res;
  // DMA
  logic            d_tx_wr;
  logic [7:0]      d_tx_data;
  logic            nvm_we, nvm_re;
  logic [ADDR_W-1:0] nvm_waddr, nvm_raddr;
  logic [7:0]      nvm_wdata, nvm_rdata;
  // queue state
  logic [N_QUEUES-1:0] q_full, q_empty;
  logic [N_MCU-1:0]    wake_ack;

  spi_port_mux #(.N_MCU(N_MCU)) u_mux (
    .clk, .rst_n,
    .p_sclk(spi_sclk), .p_cs_n(spi_cs_n), .p_mosi(spi_mosi), .p_miso(spi_miso),
    .s_sclk, .s_cs_n, .s_mosi, .s_miso,
    .granted, .req_id, .collision(spi_collision)
  );

  spi_slave u_spi (
    .clk, .rst_n,
    .sclk(s_sclk), .cs_n(s_cs_n), .mosi(s_mosi), .miso(s_miso),
    .cs_active, .cs_start, .cs_end, .rx_valid, .rx_data,
    .tx_wr, .tx_data, .tx_empty
  );

  // the state machine and the DMA never write the holding register together
  assign tx_wr   = f_tx_wr | d_tx_wr;
  assign tx_data = f_tx_wr ? f_tx_data : d_tx_data;

  mem_ctrl_fsm #(.ADDR_W(ADDR_W), .QW(QW)) u_fsm (
    .clk, .rst_n,
    .caller_id(6'(req_id)),
    .cs_start, .cs_end, .rx_valid, .rx_data, .tx_empty,
    .tx_wr(f_tx_wr), .tx_data(f_tx_data),
    .out_src, .out_found, .out_q, .out_full, .out_tail, .out_item,
    .in_src, .in_dst, .in_found, .in_q, .in_empty, .in_head, .in_item, .in_count,
    .commit_push, .commit_pull, .commit_q,
    .dma_start, .dma_dir, .dma_addr, .dma_len, .dma_abort,
    .done_push, .done_pull, .done_res
  );

  dma_ctrl #(.ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .addr(dma_addr), .len(dma_len),
    .stop(dma_abort), .busy(dma_busy),
    .rx_valid, .rx_data, .tx_empty, .tx_wr(d_tx_wr), .tx_data(d_tx_data),
    .nvm_we, .nvm_waddr, .nvm_wdata, .nvm_re, .nvm_raddr, .nvm_rdata
  );

  nvm_fifo_buffer #(.BYTES(NVM_BYTES)) u_nvm (
    .clk,
    .we(nvm_we), .waddr(nvm_waddr), .wdata(nvm_wdata),
    .re(nvm_re), .raddr(nvm_raddr), .rdata(nvm_rdata)
  );

  queue_table #(.N_QUEUES(N_QUEUES), .QCFG(QCFG), .NVM_BYTES(NVM_BYTES)) u_qt (
    .clk, .fmt,
    .out_src, .out_found, .out_q, .out_full, .out_tail, .out_item,
    .in_src, .in_dst, .in_found, .in_q, .in_empty, .in_head, .in_item, .in_count,
    .commit_push, .commit_push_q(commit_q), .commit_pull, .commit_pull_q(commit_q),
    .q_count, .q_full, .q_empty
  );

  assign op_done = done_push | done_pull;
  assign op_res  = done_res;

  // a newly granted SPI transaction acknowledges that MCU's wake-up
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) granted_q <= 1'b0;
    else        granted_q <= granted;
  end

  always_comb begin
    wake_ack = '0;
    if (granted && !granted_q) wake_ack[req_id] = 1'b1;
  end

  status_gpio #(.N_MCU(N_MCU), .N_QUEUES(N_QUEUES), .QCFG(QCFG)) u_gpio (
    .clk, .rst_n, .q_full, .q_empty, .wake_ack,
    .data_ready(gpio_data_ready), .space_ready(gpio_space_ready), .wake(gpio_wake)
  );

  // holding-register writers are exclusive; a commit only follows a DMA that
  // has finished its work
  assert property (@(posedge clk) disable iff (!rst_n) !(f_tx_wr && d_tx_wr));
  assert property (@(posedge clk) disable iff (!rst_n) nvm_we |-> cs_active);
  assert property (@(posedge clk) disable iff (!rst_n) (commit_push || commit_pull) |-> !dma_busy || dma_dir);

endmodule
