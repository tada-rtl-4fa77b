// tada_pkg: types and constants shared by the task-decoupling interconnect.
//
// The interconnect offers three operations to the attached MCUs: push a
// message into the MCU's outgoing queue, pull a message from the queue fed by
// a named upstream MCU, and read the status of those queues. Each operation is
// one SPI transaction whose first byte carries a 2-bit opcode and a 6-bit MCU
// id. The byte layouts, result codes and status flags below are this design's
// own encoding; the three operations and their arguments follow the message
// passing API push(message, size), pull(message, size, id), status(id).
package tada_pkg;

  // Opcode in bits [7:6] of the first byte of a transaction.
  typedef enum logic [1:0] {
    OP_NOP    = 2'b00,
    OP_PUSH   = 2'b01,
    OP_PULL   = 2'b10,
    OP_STATUS = 2'b11
  } op_e;

  // Result byte returned after a push, and ahead of the data of a pull.
  typedef enum logic [7:0] {
    RES_OK      = 8'h01,
    RES_FULL    = 8'h02,  // push: no free slot in the outgoing queue
    RES_EMPTY   = 8'h03,  // pull: nothing queued from that MCU
    RES_NOQUEUE = 8'h04,  // no queue configured for that MCU pair
    RES_BADLEN  = 8'h05   // size differs from the queue's item size
  } res_e;

  // Bits of the status byte returned by a status transaction.
  localparam int unsigned ST_IN_AVAIL  = 0;  // queue id->caller holds an item
  localparam int unsigned ST_OUT_SPACE = 1;  // caller's outgoing queue has a free slot
  localparam int unsigned ST_IN_FOUND  = 2;  // queue id->caller exists
  localparam int unsigned ST_OUT_FOUND = 3;  // caller has an outgoing queue

  // Width of message sizes and item counts on the wire.
  localparam int unsigned LEN_W = 16;

  // One queue, fixed when the interconnect is built: producer MCU, consumer
  // MCU, size of one item in bytes and number of item slots.
  typedef struct packed {
    logic [5:0]  src;
    logic [5:0]  dst;
    logic [15:0] item_bytes;
    logic [15:0] depth;
  } queue_cfg_t;

  function automatic queue_cfg_t qcfg(logic [5:0] src, logic [5:0] dst,
                                      logic [15:0] item_bytes, logic [15:0] depth);
    queue_cfg_t c;
    c.src        = src;
    c.dst        = dst;
    c.item_bytes = item_bytes;
    c.depth      = depth;
    return c;
  endfunction

endpackage
