// hc_pkg: types and constants shared by the task-management blocks.
//
// A task is an opaque 256-bit word (the task width used for the synthesized
// system); the framework never looks inside it. Addresses are 64-bit byte
// addresses. Memory is reached through one simple request/response port per
// server: a request carries a write flag, a 32-byte-aligned address, a 256-bit
// data word and a byte strobe (as on an AXI write channel); read responses
// return in request order. A closure occupies CLOSURE_BYTES: word 0 holds the
// join counter in bits [31:0], word 1 holds the successor task itself.
// The closure layout and the memory port are choices of this design; the
// 256-bit task width follows the synthesized configuration.
package hc_pkg;
  localparam int unsigned TASK_W        = 256;
  localparam int unsigned ADDR_W        = 64;
  localparam int unsigned WORD_BYTES    = TASK_W / 8;     // 32
  localparam int unsigned CLOSURE_BYTES = 2 * WORD_BYTES; // 64
  localparam int unsigned JOIN_W        = 32;

  typedef logic [TASK_W-1:0] task_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    logic                  we;
    addr_t                 addr;
    logic [TASK_W-1:0]     wdata;
    logic [WORD_BYTES-1:0] wstrb;
  } mem_req_t;

  // Flit of a scheduler data ring: a task plus the number of hops it made
  // since it was injected (the servers use it to spot unclaimed tasks).
  // This is the minimum width; a scheduler widens it for rings of more
  // than 255 nodes.
  localparam int unsigned AGE_W = 8;
endpackage
