// tb_status_gpio: drives the full/empty flags of three queues (0->1, 1->2,
// 0->2) and checks the ready lines of each MCU against a reference, the
// wake-up raised on a rising ready line and its clearing by wake_ack.
module tb_status_gpio;
  import tada_pkg::*;
  localparam queue_cfg_t CFG [3] = '{qcfg(0, 1, 4, 2), qcfg(1, 2, 4, 2), qcfg(0, 2, 4, 2)};
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] q_full = '0, q_empty = '1, wake_ack = '0;
  logic [2:0] data_ready, space_ready, wake;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  status_gpio #(.N_MCU(3), .N_QUEUES(3), .QCFG(CFG)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_dr, exp_sr;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      q_empty = 3'($urandom);
      q_full  = 3'($urandom) & ~q_empty;
      #1;
      // MCU0 pushes into queue 0 (first queue it produces), MCU1 into queue 1
      exp_sr = {1'b0, ~q_full[1], ~q_full[0]};
      exp_dr = {~q_empty[1] | ~q_empty[2], ~q_empty[0], 1'b0};
      check(space_ready == exp_sr, $sformatf("space_ready %b vs %b", space_ready, exp_sr));
      check(data_ready == exp_dr, $sformatf("data_ready %b vs %b", data_ready, exp_dr));
    end
    // wake-up
    @(negedge clk);
    q_empty = '1; q_full = 3'b001;
    wake_ack = '1;
    @(negedge clk);
    wake_ack = '0;
    @(negedge clk);
    check(wake == 3'b000, "no wake-up while nothing changes");
    q_full = 3'b000;               // queue 0 gets a free slot -> MCU0 space
    @(negedge clk);
    @(negedge clk);
    check(wake == 3'b001, "MCU0 woken when space frees");
    q_empty = 3'b011;              // queue 2 gets data -> MCU2
    @(negedge clk);
    @(negedge clk);
    check(wake == 3'b101, "MCU2 woken when data arrives");
    wake_ack = 3'b001;
    @(negedge clk);
    wake_ack = '0;
    @(negedge clk);
    check(wake == 3'b100, "wake_ack clears only MCU0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
