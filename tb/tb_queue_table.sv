// tb_queue_table: three queues with different item sizes and depths
// (0->1: 3 B x 4, 1->2: 5 B x 2, 0->2: 2 B x 3). Random push and pull commits
// are mirrored in a reference model; the test checks the region layout, head
// and tail addresses with wrap-around, counts, full/empty, both lookups, that
// commits into a full or from an empty queue are ignored, and that the state
// is cleared only by fmt.
module tb_queue_table;
  import tada_pkg::*;
  localparam int unsigned NQ = 3;
  localparam queue_cfg_t CFG [NQ] = '{qcfg(0, 1, 3, 4), qcfg(1, 2, 5, 2), qcfg(0, 2, 2, 3)};
  localparam int unsigned BASE [NQ] = '{0, 12, 22};

  logic clk = 1'b0, fmt = 1'b0;
  logic [5:0] out_src = '0, in_src = '0, in_dst = '0;
  logic out_found, out_full, in_found, in_empty;
  logic [1:0] out_q, in_q, commit_push_q = '0, commit_pull_q = '0;
  logic [5:0] out_tail, in_head;
  logic [15:0] out_item, in_item, in_count;
  logic commit_push = 1'b0, commit_pull = 1'b0;
  logic [15:0] q_count [NQ];
  logic [NQ-1:0] q_full, q_empty;
  int checks = 0, failures = 0;
  int unsigned r_head [NQ], r_tail [NQ], r_cnt [NQ];

  always #5 clk = ~clk;

  queue_table #(.N_QUEUES(NQ), .QCFG(CFG), .NVM_BYTES(64)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare_all();
    for (int q = 0; q < NQ; q++) begin
      check(q_count[q] == 16'(r_cnt[q]), $sformatf("q%0d count %0d vs %0d", q, q_count[q], r_cnt[q]));
      check(q_full[q] == (r_cnt[q] == CFG[q].depth), $sformatf("q%0d full", q));
      check(q_empty[q] == (r_cnt[q] == 0), $sformatf("q%0d empty", q));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    fmt = 1'b1;
    @(negedge clk);
    fmt = 1'b0;
    for (int q = 0; q < NQ; q++) begin
      r_head[q] = BASE[q]; r_tail[q] = BASE[q]; r_cnt[q] = 0;
    end
    compare_all();
    // lookups
    out_src = 6'd0; #1;
    check(out_found && out_q == 2'd0 && out_item == 16'd3, "MCU0 pushes into queue 0");
    out_src = 6'd1; #1;
    check(out_found && out_q == 2'd1 && out_item == 16'd5, "MCU1 pushes into queue 1");
    out_src = 6'd2; #1;
    check(!out_found, "MCU2 has no outgoing queue");
    in_src = 6'd0; in_dst = 6'd2; #1;
    check(in_found && in_q == 2'd2 && in_item == 16'd2, "pair 0->2 is queue 2");
    in_src = 6'd2; in_dst = 6'd0; #1;
    check(!in_found, "pair 2->0 has no queue");
    // random commits
    for (int k = 0; k < 400; k++) begin
      int unsigned q = $urandom_range(NQ - 1);
      bit push = $urandom_range(1) == 1;
      @(negedge clk);
      commit_push = push;  commit_push_q = 2'(q);
      commit_pull = !push; commit_pull_q = 2'(q);
      @(negedge clk);
      commit_push = 1'b0; commit_pull = 1'b0;
      if (push && r_cnt[q] < CFG[q].depth) begin
        r_tail[q] = (r_tail[q] + CFG[q].item_bytes >= BASE[q] + CFG[q].item_bytes * CFG[q].depth)
                    ? BASE[q] : r_tail[q] + CFG[q].item_bytes;
        r_cnt[q]++;
      end else if (!push && r_cnt[q] > 0) begin
        r_head[q] = (r_head[q] + CFG[q].item_bytes >= BASE[q] + CFG[q].item_bytes * CFG[q].depth)
                    ? BASE[q] : r_head[q] + CFG[q].item_bytes;
        r_cnt[q]--;
      end
      compare_all();
      out_src = (q == 1) ? 6'd1 : 6'd0;
      in_src = CFG[q].src; in_dst = CFG[q].dst;
      #1;
      check(in_head == 6'(r_head[q]) && in_count == 16'(r_cnt[q]), $sformatf("q%0d head %0d vs %0d", q, in_head, r_head[q]));
      if (q != 2) check(out_tail == 6'(r_tail[q]), $sformatf("q%0d tail %0d vs %0d", q, out_tail, r_tail[q]));
    end
    // fmt empties everything
    @(negedge clk);
    fmt = 1'b1;
    @(negedge clk);
    fmt = 1'b0;
    for (int q = 0; q < NQ; q++) r_cnt[q] = 0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
