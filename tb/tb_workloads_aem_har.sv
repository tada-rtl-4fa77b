// tb_workloads_aem_har: the interconnect configured for the two pipelines
// whose queues hold 700 items of 32 bits, side by side:
//   AEM: MCU 0 (sensing and floating-point processing) -> MCU 1 (radio),
//        one queue of 700 x 4 bytes
//   HAR: MCU 0 (accelerometer) -> MCU 1 (inference) -> MCU 2 (radio),
//        two queues of 700 x 4 bytes
// For AEM the producer outruns the consumer until the queue saturates at 700
// items; the producer checks the status before each push and gives up when
// there is no space; then the consumer drains the queue in order.
// For HAR 700 samples pass through both stages.
module tb_workloads_aem_har;
  import tada_pkg::*;

  localparam int unsigned DEPTH = 700;
  localparam queue_cfg_t AEM [1] = '{qcfg(0, 1, 4, DEPTH)};
  localparam queue_cfg_t HAR [2] = '{qcfg(0, 1, 4, DEPTH), qcfg(1, 2, 4, DEPTH)};

  logic clk = 1'b0, rst_n = 1'b0, fmt = 1'b0;
  // AEM instance
  logic [1:0] a_sclk, a_cs_n, a_mosi, a_miso, a_dr, a_sr, a_wk, a_col;
  logic [LEN_W-1:0] a_cnt [1];
  logic a_done;
  res_e a_res;
  // HAR instance
  logic [2:0] h_sclk, h_cs_n, h_mosi, h_miso, h_dr, h_sr, h_wk, h_col;
  logic [LEN_W-1:0] h_cnt [2];
  logic h_done;
  res_e h_res;

  always #5 clk = ~clk;

  tada_interconnect #(.N_MCU(2), .N_QUEUES(1), .QCFG(AEM)) u_aem (
    .clk, .rst_n, .fmt,
    .spi_sclk(a_sclk), .spi_cs_n(a_cs_n), .spi_mosi(a_mosi), .spi_miso(a_miso),
    .gpio_data_ready(a_dr), .gpio_space_ready(a_sr), .gpio_wake(a_wk),
    .q_count(a_cnt), .spi_collision(a_col), .op_done(a_done), .op_res(a_res)
  );
  mcu_spi_model a0 (.clk, .sclk(a_sclk[0]), .cs_n(a_cs_n[0]), .mosi(a_mosi[0]), .miso(a_miso[0]));
  mcu_spi_model a1 (.clk, .sclk(a_sclk[1]), .cs_n(a_cs_n[1]), .mosi(a_mosi[1]), .miso(a_miso[1]));

  tada_interconnect #(.N_MCU(3), .N_QUEUES(2), .QCFG(HAR)) u_har (
    .clk, .rst_n, .fmt,
    .spi_sclk(h_sclk), .spi_cs_n(h_cs_n), .spi_mosi(h_mosi), .spi_miso(h_miso),
    .gpio_data_ready(h_dr), .gpio_space_ready(h_sr), .gpio_wake(h_wk),
    .q_count(h_cnt), .spi_collision(h_col), .op_done(h_done), .op_res(h_res)
  );
  mcu_spi_model h0 (.clk, .sclk(h_sclk[0]), .cs_n(h_cs_n[0]), .mosi(h_mosi[0]), .miso(h_miso[0]));
  mcu_spi_model h1 (.clk, .sclk(h_sclk[1]), .cs_n(h_cs_n[1]), .mosi(h_mosi[1]), .miso(h_miso[1]));
  mcu_spi_model h2 (.clk, .sclk(h_sclk[2]), .cs_n(h_cs_n[2]), .mosi(h_mosi[2]), .miso(h_miso[2]));

  typedef byte unsigned bytes_t[$];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bytes_t word(int unsigned v);
    bytes_t d;
    d = '{8'(v >> 24), 8'(v >> 16), 8'(v >> 8), 8'(v)};
    return d;
  endfunction

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned res, flags;
    int unsigned cnt, n_ok, n_full, base_a, base_h;
    bytes_t r;
    base_a = $urandom;
    base_h = $urandom;
    repeat (3) @(posedge clk);
    fmt = 1'b1;
    @(posedge clk);
    fmt = 1'b0;
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    fork
      begin : aem
        // producer wakes 720 times; each time it first checks for space
        // (pre-execution check) and gives up when there is none, so the
        // queue saturates at 700 items and no push is ever refused
        n_ok = 0; n_full = 0;
        for (int k = 0; k < DEPTH + 20; k++) begin
          a0.status(8'd1, flags, cnt);
          if (!flags[ST_OUT_SPACE]) begin
            n_full++;
          end else begin
            a0.push(word(base_a + n_ok), res);
            check(res == RES_OK, "AEM: push after a positive check accepted");
            if (res == RES_OK) n_ok++;
          end
        end
        check(n_ok == DEPTH && n_full == 20, $sformatf("AEM: %0d pushed, %0d gave up", n_ok, n_full));
        a0.push(word(0), res);
        check(res == RES_FULL, "AEM: push without the check is refused when full");
        check(a_cnt[0] == 16'(DEPTH) && !a_sr[0] && a_dr[1], "AEM: queue saturated at 700");
        a1.status(8'd0, flags, cnt);
        check(cnt == DEPTH, "AEM: status reports 700 items");
        for (int k = 0; k < DEPTH; k++) begin
          a1.pull(8'd0, 4, res, r);
          check(res == RES_OK && r == word(base_a + k), $sformatf("AEM: reading %0d in order", k));
        end
        check(a_cnt[0] == 0, "AEM: queue drained");
      end
      begin : har
        byte unsigned hres;
        bytes_t hr;
        for (int k = 0; k < DEPTH; k++) begin
          h0.push(word(base_h + k), hres);
          check(hres == RES_OK, "HAR: sample accepted");
        end
        check(h_cnt[0] == 16'(DEPTH) && !h_sr[0], "HAR: sample queue holds 700");
        for (int k = 0; k < DEPTH; k++) begin
          h1.pull(8'd0, 4, hres, hr);
          check(hres == RES_OK && hr == word(base_h + k), "HAR: sample in order");
          h1.push(word(~(base_h + k)), hres);
          check(hres == RES_OK, "HAR: class accepted");
        end
        check(h_cnt[0] == 0 && h_cnt[1] == 16'(DEPTH), "HAR: results queued");
        for (int k = 0; k < DEPTH; k++) begin
          h2.pull(8'd1, 4, hres, hr);
          check(hres == RES_OK && hr == word(~(base_h + k)), "HAR: result in order");
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
