// tb_tada_interconnect: end-to-end test of the interconnect with three MCU
// models on a small queue configuration (MCU0 -> MCU1, 8-byte items, 4 slots;
// MCU1 -> MCU2, 4-byte items, 3 slots; 256 bytes of NVM), so that every
// mechanism is reached quickly. A reference model keeps the expected contents
// of each queue. Mechanisms exercised and counted: accepted push and pull,
// push refused because the queue is full, pull refused because it is empty,
// wrong size, missing queue, transfer cut short (push and pull, nothing
// committed, item delivered again), power failure with queued data kept,
// wrap-around of a queue region, status query, wake-up on GPIO and a refused
// second MCU while another is being served.
module tb_tada_interconnect;
  import tada_pkg::*;

  localparam int unsigned N_MCU = 3;
  localparam int unsigned NQ    = 2;
  localparam queue_cfg_t CFG [NQ] = '{qcfg(0, 1, 8, 4), qcfg(1, 2, 4, 3)};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fmt = 1'b0;
  logic [N_MCU-1:0] sclk, cs_n, mosi, miso;
  logic [N_MCU-1:0] data_ready, space_ready, wake, collision;
  logic [LEN_W-1:0] q_count [NQ];
  logic op_done;
  res_e op_res;

  always #5 clk = ~clk;

  tada_interconnect #(.N_MCU(N_MCU), .N_QUEUES(NQ), .QCFG(CFG), .NVM_BYTES(256)) dut (
    .clk, .rst_n, .fmt,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .gpio_data_ready(data_ready), .gpio_space_ready(space_ready), .gpio_wake(wake),
    .q_count, .spi_collision(collision), .op_done, .op_res
  );

  mcu_spi_model m0 (.clk, .sclk(sclk[0]), .cs_n(cs_n[0]), .mosi(mosi[0]), .miso(miso[0]));
  mcu_spi_model m1 (.clk, .sclk(sclk[1]), .cs_n(cs_n[1]), .mosi(mosi[1]), .miso(miso[1]));
  mcu_spi_model m2 (.clk, .sclk(sclk[2]), .cs_n(cs_n[2]), .mosi(mosi[2]), .miso(miso[2]));

  int checks = 0, failures = 0;
  int n_push_ok = 0, n_pull_ok = 0, n_full = 0, n_empty = 0, n_badlen = 0, n_noqueue = 0;
  int n_cut_push = 0, n_cut_pull = 0, n_power = 0, n_wrap = 0, n_status = 0, n_wake = 0;
  int n_collision = 0;
  int pushes_q0 = 0;

  typedef byte unsigned bytes_t[$];
  bytes_t ref_q0[$], ref_q1[$];
  int unsigned seed_cnt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bytes_t make_item(int unsigned len);
    bytes_t d;
    for (int unsigned i = 0; i < len; i++) d.push_back(8'($urandom));
    return d;
  endfunction

  task automatic push0(output byte unsigned res);
    bytes_t d = make_item(8);
    m0.push(d, res);
    if (res == RES_OK) begin
      ref_q0.push_back(d);
      n_push_ok++;
      pushes_q0++;
      if (pushes_q0 % 4 == 1 && pushes_q0 > 4) n_wrap++;
    end
  endtask

  task automatic pull1_check();
    byte unsigned res;
    bytes_t d;
    m1.pull(8'd0, 8, res, d);
    check(res == RES_OK, "pull from queue 0 accepted");
    if (res == RES_OK) begin
      n_pull_ok++;
      check(ref_q0.size() > 0 && d == ref_q0[0], "pulled item in FIFO order");
    end
    if (ref_q0.size() > 0) void'(ref_q0.pop_front());
  endtask

  // background watch: wake-ups and refused transactions
  always @(posedge clk) begin
    if (rst_n && |collision) n_collision <= n_collision + 1;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned res, flags;
    int unsigned cnt;
    bytes_t d;

    // first deployment: format the queues, then power up
    repeat (4) @(posedge clk);
    fmt = 1'b1;
    @(posedge clk);
    fmt = 1'b0;
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // status on an empty system
    m1.status(8'd0, flags, cnt);
    n_status++;
    check(flags == 8'b0000_1110, $sformatf("status flags empty system: %b", flags));
    check(cnt == 0, "status count 0");
    check(space_ready == 3'b011 && data_ready == 3'b000, "GPIO lines on empty system");

    // pull from an empty queue
    m1.pull(8'd0, 8, res, d);
    check(res == RES_EMPTY, "pull from empty queue refused");
    if (res == RES_EMPTY) n_empty++;

    // fill queue 0 and overflow it
    for (int i = 0; i < 4; i++) begin
      push0(res);
      check(res == RES_OK, "push accepted");
    end
    check(q_count[0] == 4, "queue 0 holds 4 items");
    check(space_ready[0] == 1'b0 && data_ready[1] == 1'b1, "GPIO: producer blocked, consumer ready");
    d = make_item(8);
    m0.push(d, res);
    check(res == RES_FULL, "push into full queue refused");
    if (res == RES_FULL) n_full++;
    check(q_count[0] == 4, "refused push leaves the queue");

    // status from the consumer side
    m1.status(8'd0, flags, cnt);
    n_status++;
    check(flags[ST_IN_AVAIL] && cnt == 4, "status shows 4 waiting items");

    // wrong size and missing queue
    d = make_item(5);
    m0.push(d, res);
    check(res == RES_BADLEN, "push of wrong size refused");
    if (res == RES_BADLEN) n_badlen++;
    d = make_item(4);
    m2.push(d, res);
    check(res == RES_NOQUEUE, "push from MCU without outgoing queue refused");
    if (res == RES_NOQUEUE) n_noqueue++;
    m2.pull(8'd0, 8, res, d);
    check(res == RES_NOQUEUE, "pull from unconnected pair refused");

    // pull cut short: nothing committed, item delivered again
    m1.pull(8'd0, 8, res, d, 3);
    check(res == RES_OK && d.size() == 3 && d[0] == ref_q0[0][0], "partial pull returns head bytes");
    check(q_count[0] == 4, "cut pull commits nothing");
    if (q_count[0] == 4) n_cut_pull++;
    check(wake[0] == 1'b0, "no wake-up while queue stays full");
    pull1_check();
    check(q_count[0] == 3, "pull removed one item");
    repeat (4) @(posedge clk);
    check(wake[0] == 1'b1, "wake-up raised for the blocked producer");
    if (wake[0]) n_wake++;

    // producer wakes up, its transaction clears the wake line
    m0.status(8'd1, flags, cnt);
    n_status++;
    check(flags[ST_OUT_SPACE] && !flags[ST_IN_FOUND], "producer sees free space");
    check(wake[0] == 1'b0, "wake-up cleared by the next transaction");

    // push cut short: nothing committed
    d = make_item(8);
    m0.push(d, res, 5);
    check(q_count[0] == 3, "cut push commits nothing");
    if (q_count[0] == 3) n_cut_push++;

    // power failure in the middle of a push, then power comes back
    fork
      begin
        d = make_item(8);
        m0.push(d, res);
      end
      begin
        repeat (200) @(posedge clk);
        rst_n = 1'b0;
        repeat (5) @(posedge clk);
        rst_n = 1'b1;
      end
    join
    n_power++;
    check(q_count[0] == 3, "queue kept across power failure");
    check(res != RES_OK, "interrupted push not acknowledged");

    // wrap-around: keep pushing and pulling past the region end
    for (int k = 0; k < 6; k++) begin
      push0(res);
      check(res == RES_OK, "push after wrap accepted");
      pull1_check();
    end
    while (ref_q0.size() > 0) pull1_check();
    check(q_count[0] == 0 && data_ready[1] == 1'b0, "queue 0 drained");

    // sleeping consumer: MCU1 finds nothing, waits for its wake-up line,
    // then pulls what MCU0 pushed meanwhile
    m1.status(8'd0, flags, cnt);
    check(!flags[ST_IN_AVAIL] && wake[1] == 1'b0, "consumer finds nothing and sleeps");
    fork
      begin
        repeat (500) @(posedge clk);
        push0(res);
        check(res == RES_OK, "producer pushes while consumer sleeps");
      end
      begin
        @(posedge wake[1]);
        n_wake++;
        // the wake-up can come while the producer still holds the link:
        // the consumer waits until the producer has released it
        wait (cs_n[0]);
        repeat (20) @(posedge clk);
        pull1_check();
      end
    join
    check(q_count[0] == 0, "woken consumer took the item");

    // second stage of the pipeline: MCU1 -> MCU2
    for (int k = 0; k < 3; k++) begin
      d = make_item(4);
      m1.push(d, res);
      check(res == RES_OK, "push into queue 1");
      if (res == RES_OK) ref_q1.push_back(d);
    end
    check(data_ready[2] == 1'b1 && space_ready[1] == 1'b0, "queue 1 full on GPIO");
    for (int k = 0; k < 3; k++) begin
      m2.pull(8'd1, 4, res, d);
      check(res == RES_OK && d == ref_q1[0], "MCU2 pulls in order");
      void'(ref_q1.pop_front());
    end

    // two MCUs open a transaction at once: one is served, the other refused
    fork
      begin
        m0.status(8'd1, flags, cnt);
      end
      begin
        repeat (20) @(posedge clk);
        m2.status(8'd1, flags, cnt);
      end
    join
    check(n_collision > 0, "second MCU refused while the first is served");
    m2.status(8'd1, flags, cnt);
    n_status++;
    check(flags == 8'b0000_0100, $sformatf("MCU2 status after retry: %b", flags));

    // every mechanism must have happened
    check(n_push_ok > 0, "mechanism: push");
    check(n_pull_ok > 0, "mechanism: pull");
    check(n_full > 0, "mechanism: full queue");
    check(n_empty > 0, "mechanism: empty queue");
    check(n_badlen > 0, "mechanism: wrong size");
    check(n_noqueue > 0, "mechanism: no queue");
    check(n_cut_push > 0, "mechanism: cut push");
    check(n_cut_pull > 0, "mechanism: cut pull");
    check(n_power > 0, "mechanism: power failure");
    check(n_wrap > 0, "mechanism: wrap-around");
    check(n_status > 0, "mechanism: status");
    check(n_wake > 0, "mechanism: wake-up");
    check(n_collision > 0, "mechanism: refused second MCU");
    $display("mechanisms: push=%0d pull=%0d full=%0d empty=%0d badlen=%0d noqueue=%0d cut_push=%0d cut_pull=%0d power=%0d wrap=%0d status=%0d wake=%0d collision_cycles=%0d",
             n_push_ok, n_pull_ok, n_full, n_empty, n_badlen, n_noqueue, n_cut_push, n_cut_pull,
             n_power, n_wrap, n_status, n_wake, n_collision);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
