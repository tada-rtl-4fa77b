// tb_nvm_fifo_buffer: writes random bytes to random addresses of a 1 KB
// instance, mirrors them in a reference array, and checks random reads
// (one-cycle latency) and simultaneous read/write to different addresses.
module tb_nvm_fifo_buffer;
  localparam int unsigned BYTES = 1024;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  byte unsigned ref_mem [BYTES];
  bit written [BYTES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nvm_fifo_buffer #(.BYTES(BYTES)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < BYTES; i++) written[i] = 1'b0;
    // fill every address once
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(i); wdata = 8'($urandom);
      ref_mem[i] = wdata; written[i] = 1'b1;
    end
    @(negedge clk);
    we = 1'b0;
    // random reads, some with a concurrent write elsewhere
    for (int k = 0; k < 3000; k++) begin
      int unsigned a = $urandom_range(BYTES - 1);
      int unsigned w = $urandom_range(BYTES - 1);
      @(negedge clk);
      re = 1'b1; raddr = 10'(a);
      we = (w != a) && ($urandom_range(1) == 1);
      waddr = 10'(w); wdata = 8'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != ref_mem[a]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", a, rdata, ref_mem[a]);
      end
      if (we) ref_mem[w] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
