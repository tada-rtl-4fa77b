// tb_full_size_phm: the interconnect with every parameter at its default, i.e.
// the plant-health-monitoring pipeline: MCU 0 (camera) pushes 64x64-byte
// images into a 15-slot queue, MCU 1 (inference) pulls them and pushes a
// 4-byte result each into a second 15-slot queue, MCU 2 (radio) pulls the
// results. The test fills the image queue to its 15 slots, checks that a 16th
// image is refused and that the producer's space line drops, survives a power
// failure with the 15 images queued, then runs all 15 through both stages and
// checks every byte and the FIFO order. As in the target system, the
// interconnect has no energy store of its own and is powered only while an MCU
// uses it: the control logic is reset between every two transactions, and
// only the non-volatile state carries the queues from one to the next.
module tb_full_size_phm;
  import tada_pkg::*;

  localparam int unsigned IMG = 64 * 64;
  localparam int unsigned RES = 4;
  localparam int unsigned SLOTS = 15;

  logic clk = 1'b0, rst_n = 1'b0, fmt = 1'b0;
  logic [2:0] sclk, cs_n, mosi, miso, data_ready, space_ready, wake, collision;
  logic [LEN_W-1:0] q_count [2];
  logic op_done;
  res_e op_res;

  always #5 clk = ~clk;

  tada_interconnect dut (
    .clk, .rst_n, .fmt,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .gpio_data_ready(data_ready), .gpio_space_ready(space_ready), .gpio_wake(wake),
    .q_count, .spi_collision(collision), .op_done, .op_res
  );

  mcu_spi_model m0 (.clk, .sclk(sclk[0]), .cs_n(cs_n[0]), .mosi(mosi[0]), .miso(miso[0]));
  mcu_spi_model m1 (.clk, .sclk(sclk[1]), .cs_n(cs_n[1]), .mosi(mosi[1]), .miso(miso[1]));
  mcu_spi_model m2 (.clk, .sclk(sclk[2]), .cs_n(cs_n[2]), .mosi(mosi[2]), .miso(miso[2]));

  typedef byte unsigned bytes_t[$];
  bytes_t ref_img[$], ref_res[$];
  int checks = 0, failures = 0;
  longint t0, t1;
  int n_gaps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the interconnect loses power between transactions
  task automatic power_gap();
    rst_n = 1'b0;
    repeat (7) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    n_gaps++;
  endtask

  function automatic bytes_t make_item(int unsigned len);
    bytes_t d;
    for (int unsigned i = 0; i < len; i++) d.push_back(8'($urandom));
    return d;
  endfunction

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned res, flags;
    int unsigned cnt;
    bytes_t d, r;
    repeat (3) @(posedge clk);
    fmt = 1'b1;
    @(posedge clk);
    fmt = 1'b0;
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // camera MCU fills the image queue
    for (int k = 0; k < SLOTS; k++) begin
      d = make_item(IMG);
      t0 = $time;
      m0.push(d, res);
      t1 = $time;
      check(res == RES_OK, $sformatf("image %0d accepted", k));
      ref_img.push_back(d);
      power_gap();
    end
    $display("one image push took %0d clock cycles", (t1 - t0) / 10);
    check(q_count[0] == 16'(SLOTS) && !space_ready[0] && data_ready[1], "image queue full");
    d = make_item(IMG);
    m0.push(d, res);
    check(res == RES_FULL, "16th image refused");

    // energy failure: all control state lost, queued images kept
    rst_n = 1'b0;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    m1.status(8'd0, flags, cnt);
    check(cnt == SLOTS && flags[ST_IN_AVAIL] && flags[ST_OUT_SPACE], "15 images still queued after power failure");

    // inference MCU: pull each image, push a result
    for (int k = 0; k < SLOTS; k++) begin
      m1.pull(8'd0, IMG, res, r);
      check(res == RES_OK && r == ref_img[k], $sformatf("image %0d delivered intact", k));
      power_gap();
      d = make_item(RES);
      m1.push(d, res);
      power_gap();
      check(res == RES_OK, $sformatf("result %0d accepted", k));
      ref_res.push_back(d);
    end
    check(q_count[0] == 0 && q_count[1] == 16'(SLOTS), "images consumed, results queued");

    // radio MCU pulls the results
    for (int k = 0; k < SLOTS; k++) begin
      m2.pull(8'd1, RES, res, r);
      check(res == RES_OK && r == ref_res[k], $sformatf("result %0d delivered", k));
      power_gap();
    end
    check(n_gaps == 4 * SLOTS, "interconnect powered down between transactions");
    m2.pull(8'd1, RES, res, r);
    check(res == RES_EMPTY, "result queue empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
