// status_gpio: the GPIO lines through which the interconnect tells each
// attached MCU whether its queues are ready, and wakes it up.
//
// For MCU i:
//   data_ready[i]  high while any queue whose consumer is i holds an item
//   space_ready[i] high while the queue MCU i pushes into has a free slot
//                  (low if MCU i has no outgoing queue)
//   wake[i]        set when data_ready[i] or space_ready[i] rises, held until
//                  wake_ack[i] (MCU i's next SPI transaction is granted)
// An MCU that found the interconnect not ready may sleep and wait for wake[i]
// before trying again. The two ready lines are combinational functions of the
// persistent queue state, so they are correct straight after a power-up; wake
// is volatile and cleared by reset. That the queue status reaches the MCUs on
// GPIO pins and that an interrupt wakes a sleeping MCU follows the document;
// the choice of lines and the set/clear rule are this design's own.
module status_gpio
  import tada_pkg::*;
#(
  parameter int unsigned N_MCU    = 3,
  parameter int unsigned N_QUEUES = 2,
  parameter queue_cfg_t  QCFG [N_QUEUES] = '{qcfg(0, 1, 4096, 15), qcfg(1, 2, 4, 15)}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_QUEUES-1:0] q_full,
  input  logic [N_QUEUES-1:0] q_empty,
  input  logic [N_MCU-1:0]    wake_ack,
  output logic [N_MCU-1:0]    data_ready,
  output logic [N_MCU-1:0]    space_ready,
  output logic [N_MCU-1:0]    wake
);

  logic [N_MCU-1:0] data_q, space_q;

  always_comb begin
    data_ready  = '0;
    space_ready = '0;
    for (int i = 0; i < N_MCU; i++) begin
      // the outgoing queue is the first one produced by i, as in queue_table
      for (int q = N_QUEUES - 1; q >= 0; q--) begin
        if (QCFG[q].src == 6'(i)) space_ready[i] = ~q_full[q];
      end
      for (int q = 0; q < N_QUEUES; q++) begin
        if (QCFG[q].dst == 6'(i) && !q_empty[q]) data_ready[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q  <= '1;
      space_q <= '1;
      wake    <= '0;
    end else begin
      data_q  <= data_ready;
      space_q <= space_ready;
      for (int i = 0; i < N_MCU; i++) begin
        if (wake_ack[i])                                wake[i] <= 1'b0;
        else if ((data_ready[i] && !data_q[i]) ||
                 (space_ready[i] && !space_q[i]))      wake[i] <= 1'b1;
      end
    end
  end

endmodule
