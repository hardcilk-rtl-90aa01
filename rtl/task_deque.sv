// task_deque: the local double-ended task queue between one PE and its
// scheduler client.
//
// As in Cilk work stealing, the PE works at the head: tasks it spawns are
// pushed there and the task it runs next is popped from there (newest first).
// The scheduler client works at the tail: it pops the oldest task to hand it
// to a thief or to offload it, and pushes tasks it receives from the network.
// Storage is one array of DEPTH words addressed as a circular buffer (tail
// index plus occupancy count), which maps onto a block RAM.
//
// Interface: head_push_* is the PE's spawn stream (sink), head_pop_* the PE's
// task stream (source); tail_pop_* and tail_push_* are the client's side. All
// use valid/ready and a transfer happens on a clock edge where both are high.
// Pops show the word combinationally. One head push, one head pop, one tail
// push and one tail pop may all happen in the same cycle, except that the client must not offer a tail push in a cycle
// where it pops the tail (a tail push is then ignored); when the head is
// pushed and popped together the popped word is the old head and the new
// word takes its slot. The head side has priority: the tail side is not
// offered the last task while the PE pops it, nor the last free slot while
// the PE pushes into it. count is the occupancy before this cycle's transfers.
// The double-ended organisation and the 32 x 256-bit size follow the document;
// the port handshakes and the same-cycle rules are this design's own.
module task_deque
  import hc_pkg::*;
#(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned TASK_W = hc_pkg::TASK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // PE side (head)
  input  logic              head_push_valid,
  output logic              head_push_ready,
  input  logic [TASK_W-1:0] head_push_data,
  output logic              head_pop_valid,
  input  logic              head_pop_ready,
  output logic [TASK_W-1:0] head_pop_data,
  // client side (tail)
  output logic              tail_pop_valid,
  input  logic              tail_pop_ready,
  output logic [TASK_W-1:0] tail_pop_data,
  input  logic              tail_push_valid,
  output logic              tail_push_ready,
  input  logic [TASK_W-1:0] tail_push_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = AW + 1;

  logic [TASK_W-1:0] mem [DEPTH];
  logic [AW-1:0]     tail;
  logic [AW-1:0]     head_top;   // index of the newest task
  logic              hpush, hpop, tpush, tpop;
  logic [CW-1:0]     after_head;

  assign head_top        = tail + AW'(count) - 1'b1;
  assign head_push_ready = (count < CW'(DEPTH));
  assign head_pop_valid  = (count != '0);
  assign head_pop_data   = mem[head_top];
  assign hpush           = head_push_valid && head_push_ready;
  assign hpop            = head_pop_valid && head_pop_ready;

  // occupancy once the head side has acted
  assign after_head      = count + CW'(hpush) - CW'(hpop);
  assign tail_pop_valid  = (count != '0) && !(hpop && count == CW'(1));
  assign tail_pop_data   = mem[tail];
  assign tail_push_ready = (after_head < CW'(DEPTH));
  assign tpop            = tail_pop_valid && tail_pop_ready;
  assign tpush           = tail_push_valid && tail_push_ready && !tpop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail  <= '0;
      count <= '0;
    end else begin
      if (tpop)       tail <= tail + 1'b1;
      else if (tpush) tail <= tail - 1'b1;
      count <= after_head + CW'(tpush) - CW'(tpop);
    end
  end

  always_ff @(posedge clk) begin
    if (hpush) mem[hpop ? head_top : head_top + 1'b1] <= head_push_data;
    if (tpush) mem[tail - 1'b1] <= tail_push_data;
  end

  // the client works one tail operation at a time
  a_one_tail_op: assert property (@(posedge clk) disable iff (!rst_n) !(tail_push_valid && tpop));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
