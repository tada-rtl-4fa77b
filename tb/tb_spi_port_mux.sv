// tb_spi_port_mux: checks that the mux serves the first MCU to lower CS_n,
// routes its SCLK/MOSI to the controller and MISO back only to it, refuses a
// second MCU for the rest of its transaction (collision), keeps the refused
// MCU refused until it raises CS_n, and picks the lowest port on a tie.
module tb_spi_port_mux;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] p_sclk = '0, p_cs_n = '1, p_mosi = '0, p_miso, collision;
  logic s_sclk, s_cs_n, s_mosi, s_miso = 1'b0, granted;
  logic [2:0] req_id;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_port_mux #(.N_MCU(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_clk(int n); repeat (n) @(posedge clk); #1; endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_clk(3);
    rst_n = 1'b1;
    wait_clk(3);
    check(!granted && s_cs_n, "idle: nothing granted");
    // MCU 2 opens
    p_cs_n[2] = 1'b0;
    wait_clk(4);
    check(granted && req_id == 3'd2, "MCU 2 granted");
    check(!s_cs_n, "controller sees CS_n low");
    p_sclk[2] = 1'b1; p_mosi[2] = 1'b1; s_miso = 1'b1;
    #1;
    check(s_sclk && s_mosi, "SCLK/MOSI routed from MCU 2");
    check(p_miso == 4'b0100, "MISO only to MCU 2");
    p_sclk[1] = 1'b1; p_mosi[1] = 1'b0;
    #1;
    check(s_mosi == 1'b1, "MCU 1 pins ignored");
    // MCU 1 tries during MCU 2's transaction
    p_cs_n[1] = 1'b0;
    wait_clk(4);
    check(req_id == 3'd2 && collision[1] && !collision[2], "MCU 1 refused");
    // MCU 2 closes; MCU 1 still holds CS_n low and stays refused
    p_cs_n[2] = 1'b1; p_sclk[2] = 1'b0; s_miso = 1'b0;
    wait_clk(4);
    check(!granted, "MCU 2 released, refused MCU 1 not granted mid-transaction");
    check(s_cs_n, "controller idle");
    p_cs_n[1] = 1'b1;
    wait_clk(4);
    check(collision == '0, "collision cleared");
    // tie: MCU 3 and MCU 1 open in the same cycle -> lowest wins
    p_cs_n[3] = 1'b0; p_cs_n[1] = 1'b0;
    wait_clk(4);
    check(granted && req_id == 3'd1, "tie goes to MCU 1");
    check(collision[3], "MCU 3 refused on a tie");
    p_cs_n = '1;
    wait_clk(4);
    p_cs_n[3] = 1'b0;
    wait_clk(4);
    check(granted && req_id == 3'd3, "MCU 3 served on retry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
