// tb_mem_ctrl_fsm: feeds the memory control state machine with byte-level
// SPI events (start, received bytes every 16 clocks, end) and stands in for
// the queue table with fixed lookup answers. It checks the reply bytes placed
// in the holding register, the DMA set-up (direction, address, length), the
// commit points, and that a transaction cut short or refused commits nothing.
module tb_mem_ctrl_fsm;
  import tada_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] caller_id = 6'd1;
  logic cs_start = 1'b0, cs_end = 1'b0, rx_valid = 1'b0, tx_empty;
  logic [7:0] rx_data = '0;
  logic tx_wr;
  logic [7:0] tx_data;
  logic [5:0] out_src, in_src, in_dst;
  logic out_found = 1'b1, out_full = 1'b0, in_found = 1'b1, in_empty = 1'b0;
  logic [0:0] out_q = 1'b1, in_q = 1'b0, commit_q;
  logic [15:0] out_tail = 16'h0123, in_head = 16'h0456;
  logic [15:0] out_item = 16'd6, in_item = 16'd5, in_count = 16'h0207;
  logic commit_push, commit_pull;
  logic dma_start, dma_dir, dma_abort;
  logic [15:0] dma_addr, dma_len;
  logic done_push, done_pull;
  res_e done_res;
  logic hold_v = 1'b0;
  byte unsigned txlog[$];
  int n_commit_push = 0, n_commit_pull = 0, n_dma = 0, n_abort = 0;
  logic last_dir;
  logic [15:0] last_addr, last_len;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mem_ctrl_fsm #(.ADDR_W(16), .QW(1)) dut (.*);

  assign tx_empty = !hold_v;
  always @(posedge clk) if (rst_n) begin
    if (tx_wr) begin
      txlog.push_back(tx_data);
      hold_v <= 1'b1;
    end
    if (commit_push) begin n_commit_push <= n_commit_push + 1; check(commit_q == out_q, "push commit queue"); end
    if (commit_pull) begin n_commit_pull <= n_commit_pull + 1; check(commit_q == in_q, "pull commit queue"); end
    if (dma_start) begin
      n_dma <= n_dma + 1; last_dir <= dma_dir; last_addr <= dma_addr; last_len <= dma_len;
    end
    if (dma_abort) n_abort <= n_abort + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one transaction: bytes arrive every 16 clocks; the holding register is
  // taken 4 clocks after each byte, as the SPI controller would
  task automatic frame(input byte unsigned b[$], input int n);
    txlog.delete();
    n_commit_push = 0; n_commit_pull = 0; n_dma = 0; n_abort = 0;
    @(negedge clk);
    cs_start = 1'b1;
    @(negedge clk);
    cs_start = 1'b0;
    repeat (4) @(negedge clk);
    hold_v = 1'b0;
    for (int i = 0; i < n; i++) begin
      repeat (12) @(negedge clk);
      rx_valid = 1'b1; rx_data = (i < b.size()) ? b[i] : 8'h00;
      @(negedge clk);
      rx_valid = 1'b0;
      repeat (4) @(negedge clk);
      hold_v = 1'b0;
    end
    repeat (4) @(negedge clk);
    cs_end = 1'b1;
    @(negedge clk);
    cs_end = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned b[$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // accepted push of 6 bytes
    b = '{{OP_PUSH, 6'd0}, 8'h00, 8'h06, 1, 2, 3, 4, 5, 6, 0};
    frame(b, 10);
    check(out_src == 6'd1, "push looks up the caller's queue");
    check(n_dma == 1 && last_dir == 1'b0 && last_addr == out_tail && last_len == 16'd6, "push DMA set-up");
    check(n_commit_push == 1 && n_commit_pull == 0, "push committed once");
    check(txlog.size() == 1 && txlog[0] == RES_OK, "push result OK");
    // push into a full queue
    out_full = 1'b1;
    frame(b, 10);
    check(n_dma == 0 && n_commit_push == 0, "full queue: no DMA, no commit");
    check(txlog.size() == 1 && txlog[0] == RES_FULL, "push result FULL");
    out_full = 1'b0;
    // push of the wrong size
    b = '{{OP_PUSH, 6'd0}, 8'h00, 8'h04, 1, 2, 3, 4, 0};
    frame(b, 8);
    check(n_commit_push == 0 && txlog.size() == 1 && txlog[0] == RES_BADLEN, "push result BADLEN");
    // push cut short
    b = '{{OP_PUSH, 6'd0}, 8'h00, 8'h06, 1, 2, 3};
    frame(b, 6);
    check(n_commit_push == 0 && n_abort == 1, "cut push: aborted, not committed");
    // accepted pull of 5 bytes from MCU 3
    b = '{{OP_PULL, 6'd3}, 8'h00, 8'h05};
    frame(b, 9);
    check(in_src == 6'd3 && in_dst == 6'd1, "pull looks up pair 3->caller");
    check(txlog.size() >= 1 && txlog[0] == RES_OK, "pull result OK first");
    check(n_dma == 1 && last_dir == 1'b1 && last_addr == in_head && last_len == 16'd5, "pull DMA set-up");
    check(n_commit_pull == 1, "pull committed after the last byte");
    // pull cut one byte short
    frame(b, 8);
    check(n_commit_pull == 0 && n_abort == 1, "cut pull not committed");
    // pull from empty queue
    in_empty = 1'b1;
    frame(b, 9);
    check(txlog.size() == 1 && txlog[0] == RES_EMPTY && n_dma == 0 && n_commit_pull == 0, "pull result EMPTY");
    in_empty = 1'b0;
    // pull from a missing pair
    in_found = 1'b0;
    frame(b, 9);
    check(txlog.size() == 1 && txlog[0] == RES_NOQUEUE, "pull result NOQUEUE");
    // status: flags, count high, count low
    in_found = 1'b1; out_full = 1'b1;
    b = '{{OP_STATUS, 6'd3}};
    frame(b, 4);
    check(txlog.size() == 3, $sformatf("status returns 3 bytes, got %0d", txlog.size()));
    if (txlog.size() == 3) begin
      check(txlog[0] == 8'b0000_1101, $sformatf("status flags %b", txlog[0]));
      check(txlog[1] == 8'h02 && txlog[2] == 8'h07, "status count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
