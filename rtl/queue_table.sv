// queue_table: the state of the interconnect's FIFO queues, one per pair of
// upstream/downstream MCUs, fixed when the design is built.
//
// Queue q owns the NVM region [BASE(q), BASE(q) + item_bytes*depth); regions
// are laid out back to back from address 0 in the order of QCFG. For each
// queue the table keeps the byte address of the oldest item (head), of the next
// free slot (tail) and the number of stored items. These registers belong to
// the non-volatile state: they are cleared only by fmt (run once when the
// system is deployed), not by the power-on reset, so that queue contents
// survive energy failures.
//
// Lookups are combinational. The "out" lookup finds the queue a caller pushes
// into (the first queue whose producer is out_src); the "in" lookup finds the
// queue from producer in_src to consumer in_dst. commit_push / commit_pull
// advance tail or head by one item, with wrap-around, in one cycle; the memory
// controller issues them only after a whole message has crossed the SPI link,
// so a transfer cut short by an energy failure leaves the queue as it was.
// Per-queue counts and full/empty flags feed the GPIO status lines.
// Pairwise queues, compile-time configuration and item sizes follow the
// document; the layout and the commit rule are this design's own.
module queue_table
  import tada_pkg::*;
#(
  parameter int unsigned N_QUEUES  = 2,
  parameter queue_cfg_t  QCFG [N_QUEUES] = '{qcfg(0, 1, 4096, 15), qcfg(1, 2, 4, 15)},
  parameter int unsigned NVM_BYTES = 65536,
  parameter int unsigned ADDR_W    = $clog2(NVM_BYTES),
  parameter int unsigned QW        = (N_QUEUES > 1) ? $clog2(N_QUEUES) : 1
) (
  input  logic                 clk,
  input  logic                 fmt,          // empty every queue
  // outgoing-queue lookup (push side)
  input  logic [5:0]           out_src,
  output logic                 out_found,
  output logic [QW-1:0]        out_q,
  output logic                 out_full,
  output logic [ADDR_W-1:0]    out_tail,
  output logic [LEN_W-1:0]     out_item,
  // incoming-queue lookup (pull side)
  input  logic [5:0]           in_src,
  input  logic [5:0]           in_dst,
  output logic                 in_found,
  output logic [QW-1:0]        in_q,
  output logic                 in_empty,
  output logic [ADDR_W-1:0]    in_head,
  output logic [LEN_W-1:0]     in_item,
  output logic [LEN_W-1:0]     in_count,
  // commits
  input  logic                 commit_push,
  input  logic [QW-1:0]        commit_push_q,
  input  logic                 commit_pull,
  input  logic [QW-1:0]        commit_pull_q,
  // per-queue state
  output logic [LEN_W-1:0]     q_count [N_QUEUES],
  output logic [N_QUEUES-1:0]  q_full,
  output logic [N_QUEUES-1:0]  q_empty
);

  function automatic int unsigned region_base(int unsigned q);
    int unsigned b = 0;
    for (int unsigned k = 0; k < q; k++) b += int'(QCFG[k].item_bytes) * int'(QCFG[k].depth);
    return b;
  endfunction

  localparam int unsigned TOTAL_BYTES = region_base(N_QUEUES);

  initial begin
    if (TOTAL_BYTES > NVM_BYTES)
      $fatal(1, "queue_table: queues need %0d bytes, NVM holds %0d", TOTAL_BYTES, NVM_BYTES);
  end

  logic [ADDR_W-1:0] head  [N_QUEUES];
  logic [ADDR_W-1:0] tail  [N_QUEUES];
  logic [LEN_W-1:0]  count [N_QUEUES];

  for (genvar q = 0; q < N_QUEUES; q++) begin : g_q
    localparam int unsigned BASE = region_base(q);
    localparam int unsigned LAST = BASE + (int'(QCFG[q].depth) - 1) * int'(QCFG[q].item_bytes);
    localparam logic [ADDR_W-1:0] BASE_A = ADDR_W'(BASE);
    localparam logic [ADDR_W-1:0] LAST_A = ADDR_W'(LAST);
    localparam logic [ADDR_W-1:0] ITEM_A = ADDR_W'(int'(QCFG[q].item_bytes));

    wire do_push = commit_push && (commit_push_q == QW'(q)) && !q_full[q];
    wire do_pull = commit_pull && (commit_pull_q == QW'(q)) && !q_empty[q];

    always_ff @(posedge clk) begin
      if (fmt) begin
        head[q]  <= BASE_A;
        tail[q]  <= BASE_A;
        count[q] <= '0;
      end else begin
        if (do_push) tail[q] <= (tail[q] == LAST_A) ? BASE_A : tail[q] + ITEM_A;
        if (do_pull) head[q] <= (head[q] == LAST_A) ? BASE_A : head[q] + ITEM_A;
        if (do_push && !do_pull)      count[q] <= count[q] + 1'b1;
        else if (do_pull && !do_push) count[q] <= count[q] - 1'b1;
      end
    end

    assign q_count[q] = count[q];
    assign q_full[q]  = (count[q] == QCFG[q].depth);
    assign q_empty[q] = (count[q] == '0);
  end

  always_comb begin
    out_found = 1'b0;
    out_q     = '0;
    for (int q = N_QUEUES - 1; q >= 0; q--) begin
      if (QCFG[q].src == out_src) begin
        out_found = 1'b1;
        out_q     = QW'(q);
      end
    end
    in_found = 1'b0;
    in_q     = '0;
    for (int q = N_QUEUES - 1; q >= 0; q--) begin
      if (QCFG[q].src == in_src && QCFG[q].dst == in_dst) begin
        in_found = 1'b1;
        in_q     = QW'(q);
      end
    end
  end

  assign out_full = q_full[out_q];
  assign out_tail = tail[out_q];
  assign out_item = QCFG[out_q].item_bytes;
  assign in_empty = q_empty[in_q];
  assign in_head  = head[in_q];
  assign in_item  = QCFG[in_q].item_bytes;
  assign in_count = count[in_q];

endmodule
