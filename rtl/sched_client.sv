// sched_client: scheduler client, the link between one local task queue and
// the two rings of a work-stealing scheduler network.
//
// Policy, evaluated each cycle from the queue occupancy (q_count):
//   * near-empty (q_count <= REQ_THR) and no request outstanding: inject a
//     steal request on the requests ring, then take the first task that
//     passes on the data ring and push it into the queue;
//   * enough tasks (q_count >= STEAL_THR): take a passing steal request, pop
//     the oldest task from the queue tail and inject it on the data ring;
//   * near-full (q_count >= OFFLOAD_THR): pop the oldest task and inject it on
//     the data ring without waiting for a request.
// A client serving a PE that may spawn but not execute this task type is
// built with CAN_EXECUTE = 0: it never requests and offloads every task
// (OFFLOAD_THR = 1). Steal requests carry no payload; a task on the data ring
// goes to the first node that wants one, so a client that got a task from
// elsewhere leaves its request circulating and any surplus task ends at a
// scheduler server. A client also stops waiting when its own PE refills the
// queue above REQ_THR, so that it can serve and offload again.
// Counters n_requests / n_steals_served / n_offloads / n_received count the
// four actions for observation. The three behaviours follow the document; the
// threshold values and the first-taker rule are this design's choices.
module sched_client
  import hc_pkg::*;
#(
  parameter int unsigned DEPTH       = 32,
  parameter int unsigned TASK_W      = hc_pkg::TASK_W,
  parameter int unsigned REQ_THR     = 0,
  parameter int unsigned STEAL_THR   = 2,
  parameter int unsigned OFFLOAD_THR = DEPTH - 2,
  parameter bit          CAN_EXECUTE = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // queue tail side
  input  logic [$clog2(DEPTH):0] q_count,
  input  logic              q_pop_valid,
  output logic              q_pop_ready,
  input  logic [TASK_W-1:0] q_pop_data,
  output logic              q_push_valid,
  input  logic              q_push_ready,
  output logic [TASK_W-1:0] q_push_data,
  // requests ring node
  input  logic              rq_peek_valid,
  output logic              rq_take,
  output logic              rq_inj_valid,
  input  logic              rq_inj_ready,
  // data ring node
  input  logic              dt_peek_valid,
  input  logic [TASK_W-1:0] dt_peek_data,
  output logic              dt_take,
  output logic              dt_inj_valid,
  output logic [TASK_W-1:0] dt_inj_data,
  input  logic              dt_inj_ready,
  // activity counters
  output logic [31:0]       n_requests,
  output logic [31:0]       n_steals_served,
  output logic [31:0]       n_offloads,
  output logic [31:0]       n_received
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;
  logic pending;
  logic serve, offload, send;

  // ask for work
  assign rq_inj_valid = CAN_EXECUTE && !pending && (q_count <= CW'(REQ_THR));

  // receive work
  assign dt_take      = pending && dt_peek_valid && q_push_ready;
  assign q_push_valid = dt_take;
  assign q_push_data  = dt_peek_data;

  // give work: serving a request or offloading; never while waiting for work
  assign serve   = !pending && rq_peek_valid && q_pop_valid && (q_count >= CW'(STEAL_THR));
  assign offload = !pending && q_pop_valid && (q_count >= CW'(OFFLOAD_THR));
  assign send    = serve || offload;
  assign dt_inj_valid = send;
  assign dt_inj_data  = q_pop_data;
  assign q_pop_ready  = send && dt_inj_ready;
  assign rq_take      = serve && dt_inj_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending         <= 1'b0;
      n_requests      <= '0;
      n_steals_served <= '0;
      n_offloads      <= '0;
      n_received      <= '0;
    end else begin
      if (rq_inj_valid && rq_inj_ready) begin
        pending    <= 1'b1;
        n_requests <= n_requests + 1'b1;
      end
      if (dt_take) begin
        pending    <= 1'b0;
        n_received <= n_received + 1'b1;
      end else if (pending && q_count > CW'(REQ_THR)) begin
        pending    <= 1'b0;   // the PE refilled its own queue: stop waiting
      end
      if (rq_take)                        n_steals_served <= n_steals_served + 1'b1;
      else if (q_pop_ready && q_pop_valid) n_offloads      <= n_offloads + 1'b1;
    end
  end

  a_one_end: assert property (@(posedge clk) disable iff (!rst_n) !(q_push_valid && q_pop_ready));
endmodule
