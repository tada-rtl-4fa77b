// mem_ctrl_fsm: the memory control function of the interconnect. It decodes
// each SPI transaction, checks the queue it names, sets up the DMA for the
// message body and commits the queue once the whole message has crossed.
//
// Transactions (first byte = {opcode[1:0], id[5:0]}; the caller is the MCU
// whose SPI port was granted, caller_id):
//   PUSH   MOSI: cmd, len_hi, len_lo, len data bytes, one dummy byte
//          MISO: ---, ------, ------, ---------------, result
//          Stores one item in the caller's outgoing queue. The tail moves only
//          when the last data byte has arrived; a refused push (queue full, no
//          queue, len not the item size) discards the bytes.
//   PULL   MOSI: cmd|id, len_hi, len_lo, 1+len dummy bytes
//          MISO: ------, ------, ------, result, len data bytes
//          Reads the oldest item of queue id->caller. The head moves only when
//          the master has clocked in the last data byte; if CS_n rises earlier
//          the item stays queued and is delivered again by the next pull.
//   STATUS MOSI: cmd|id, 3 dummy bytes
//          MISO: ------, flags, count_hi, count_lo
//          flags as in tada_pkg (ST_*); count = items in queue id->caller.
// Every response byte is placed within one system clock of the rx_valid of
// the byte before it, inside the window the SPI controller allows. CS_n rising
// ends any transaction, aborts the DMA and commits nothing. The three
// operations and the pairwise FIFO order follow the document; the framing,
// result codes and the commit points are this design's own.
module mem_ctrl_fsm
  import tada_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned QW     = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [5:0]        caller_id,
  // SPI controller
  input  logic              cs_start,
  input  logic              cs_end,
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  input  logic              tx_empty,
  output logic              tx_wr,
  output logic [7:0]        tx_data,
  // queue table
  output logic [5:0]        out_src,
  input  logic              out_found,
  input  logic [QW-1:0]     out_q,
  input  logic              out_full,
  input  logic [ADDR_W-1:0] out_tail,
  input  logic [LEN_W-1:0]  out_item,
  output logic [5:0]        in_src,
  output logic [5:0]        in_dst,
  input  logic              in_found,
  input  logic [QW-1:0]     in_q,
  input  logic              in_empty,
  input  logic [ADDR_W-1:0] in_head,
  input  logic [LEN_W-1:0]  in_item,
  input  logic [LEN_W-1:0]  in_count,
  output logic              commit_push,
  output logic              commit_pull,
  output logic [QW-1:0]     commit_q,
  // DMA
  output logic              dma_start,
  output logic              dma_dir,
  output logic [ADDR_W-1:0] dma_addr,
  output logic [LEN_W-1:0]  dma_len,
  output logic              dma_abort,
  // transaction outcome, one-cycle pulses
  output logic              done_push,
  output logic              done_pull,
  output res_e              done_res
);

  typedef enum logic [3:0] {
    S_IDLE, S_CMD, S_LEN_HI, S_LEN_LO, S_CHECK,
    S_PUSH_DATA, S_PULL_DATA, S_STAT0, S_STATUS, S_DRAIN
  } state_e;

  state_e            st;
  op_e               op;
  logic [5:0]        id;
  logic [7:0]        len_hi;
  logic [LEN_W-1:0]  len, cnt;
  logic [QW-1:0]     qsel;
  res_e              res;
  logic [1:0]        resp_idx;
  res_e              chk_res;
  logic [7:0]        flags;

  always_comb begin
    flags               = '0;
    flags[ST_IN_AVAIL]  = in_found & ~in_empty;
    flags[ST_OUT_SPACE] = out_found & ~out_full;
    flags[ST_IN_FOUND]  = in_found;
    flags[ST_OUT_FOUND] = out_found;
  end

  assign out_src = caller_id;
  assign in_src  = id;
  assign in_dst  = caller_id;

  // verdict on a push or pull, from the queue state at the S_CHECK cycle
  always_comb begin
    chk_res = RES_OK;
    if (op == OP_PUSH) begin
      if (!out_found)           chk_res = RES_NOQUEUE;
      else if (len != out_item) chk_res = RES_BADLEN;
      else if (out_full)        chk_res = RES_FULL;
    end else begin
      if (!in_found)            chk_res = RES_NOQUEUE;
      else if (len != in_item)  chk_res = RES_BADLEN;
      else if (in_empty)        chk_res = RES_EMPTY;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      op          <= OP_NOP;
      id          <= '0;
      len_hi      <= '0;
      len         <= '0;
      cnt         <= '0;
      qsel        <= '0;
      res         <= RES_OK;
      resp_idx    <= '0;
      tx_wr       <= 1'b0;
      tx_data     <= '0;
      commit_push <= 1'b0;
      commit_pull <= 1'b0;
      commit_q    <= '0;
      dma_start   <= 1'b0;
      dma_dir     <= 1'b0;
      dma_addr    <= '0;
      dma_len     <= '0;
      dma_abort   <= 1'b0;
      done_push   <= 1'b0;
      done_pull   <= 1'b0;
      done_res    <= RES_OK;
    end else begin
      tx_wr       <= 1'b0;
      commit_push <= 1'b0;
      commit_pull <= 1'b0;
      dma_start   <= 1'b0;
      dma_abort   <= 1'b0;
      done_push   <= 1'b0;
      done_pull   <= 1'b0;
      if (cs_end) begin
        dma_abort <= 1'b1;
        st        <= S_IDLE;
      end else begin
        unique case (st)
          S_IDLE: if (cs_start) st <= S_CMD;
          S_CMD: if (rx_valid) begin
            op <= op_e'(rx_data[7:6]);
            id <= rx_data[5:0];
            unique case (op_e'(rx_data[7:6]))
              OP_PUSH, OP_PULL: st <= S_LEN_HI;
              OP_STATUS:        st <= S_STAT0;
              default:          st <= S_DRAIN;
            endcase
          end
          S_LEN_HI: if (rx_valid) begin
            len_hi <= rx_data;
            st     <= S_LEN_LO;
          end
          S_LEN_LO: if (rx_valid) begin
            len <= {len_hi, rx_data};
            st  <= S_CHECK;
          end
          S_CHECK: begin
            res <= chk_res;
            cnt <= '0;
            if (op == OP_PUSH) begin
              qsel <= out_q;
              if (chk_res == RES_OK) begin
                dma_start <= 1'b1;
                dma_dir   <= 1'b0;
                dma_addr  <= out_tail;
                dma_len   <= len;
              end
              if (len == '0) begin
                tx_wr     <= 1'b1;
                tx_data   <= chk_res;
                done_push <= 1'b1;
                done_res  <= chk_res;
                st        <= S_DRAIN;
              end else begin
                st <= S_PUSH_DATA;
              end
            end else begin
              qsel    <= in_q;
              tx_wr   <= 1'b1;
              tx_data <= chk_res;
              if (chk_res == RES_OK) begin
                dma_start <= 1'b1;
                dma_dir   <= 1'b1;
                dma_addr  <= in_head;
                dma_len   <= len;
              end
              if (len == '0) begin
                done_pull <= 1'b1;
                done_res  <= chk_res;
                st        <= S_DRAIN;
              end else begin
                st <= S_PULL_DATA;
              end
            end
          end
          S_PUSH_DATA: if (rx_valid) begin
            cnt <= cnt + 1'b1;
            if (cnt + 1'b1 == len) begin
              commit_push <= (res == RES_OK);
              commit_q    <= qsel;
              tx_wr       <= 1'b1;
              tx_data     <= res;
              done_push   <= 1'b1;
              done_res    <= res;
              st          <= S_DRAIN;
            end
          end
          S_PULL_DATA: if (rx_valid) begin
            // the first byte clocked here carries the result, then len data
            cnt <= cnt + 1'b1;
            if (cnt == len) begin
              commit_pull <= (res == RES_OK);
              commit_q    <= qsel;
              done_pull   <= 1'b1;
              done_res    <= res;
              st          <= S_DRAIN;
            end
          end
          S_STAT0: begin
            tx_wr    <= 1'b1;
            tx_data  <= flags;
            resp_idx <= 2'd1;
            st       <= S_STATUS;
          end
          S_STATUS: if (tx_empty && !tx_wr) begin
            tx_wr    <= 1'b1;
            tx_data  <= (resp_idx == 2'd1) ? in_count[15:8] : in_count[7:0];
            resp_idx <= resp_idx + 2'd1;
            if (resp_idx == 2'd2) st <= S_DRAIN;
          end
          S_DRAIN: ;
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  // one commit at a time, and never into the middle of a transfer set-up
  assert property (@(posedge clk) disable iff (!rst_n) !(commit_push && commit_pull));
  assert property (@(posedge clk) disable iff (!rst_n) !((commit_push || commit_pull) && dma_start));

endmodule
