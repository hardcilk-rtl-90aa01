// tb_sched_client: directed test of the scheduler client policy. The client
// is wired to a real task_deque (DEPTH 8) whose head is driven by the
// testbench; the two ring nodes are driven directly. Checks: a request is
// raised only when the queue is empty and only once; a passing task is taken
// only while waiting and lands in the queue; a request is served only with
// at least STEAL_THR tasks, the oldest task going out; a near-full queue
// offloads without a request; the activity counters match.
module tb_sched_client;
  localparam int unsigned DEPTH = 8, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic hpu_v, hpu_r, hpo_v, hpo_r; logic [W-1:0] hpu_d, hpo_d;
  logic tpo_v, tpo_r, tpu_v, tpu_r; logic [W-1:0] tpo_d, tpu_d;
  logic [$clog2(DEPTH):0] count;
  logic rq_peek_valid, rq_take, rq_inj_valid, rq_inj_ready;
  logic dt_peek_valid, dt_take, dt_inj_valid, dt_inj_ready;
  logic [W-1:0] dt_peek_data, dt_inj_data;
  logic [31:0] n_req, n_steal, n_off, n_rcv;

  task_deque #(.DEPTH(DEPTH), .TASK_W(W)) u_q (
    .clk, .rst_n,
    .head_push_valid(hpu_v), .head_push_ready(hpu_r), .head_push_data(hpu_d),
    .head_pop_valid(hpo_v), .head_pop_ready(hpo_r), .head_pop_data(hpo_d),
    .tail_pop_valid(tpo_v), .tail_pop_ready(tpo_r), .tail_pop_data(tpo_d),
    .tail_push_valid(tpu_v), .tail_push_ready(tpu_r), .tail_push_data(tpu_d), .count);

  sched_client #(.DEPTH(DEPTH), .TASK_W(W), .REQ_THR(0), .STEAL_THR(2), .OFFLOAD_THR(DEPTH - 2)) dut (
    .clk, .rst_n, .q_count(count), .q_pop_valid(tpo_v), .q_pop_ready(tpo_r), .q_pop_data(tpo_d),
    .q_push_valid(tpu_v), .q_push_ready(tpu_r), .q_push_data(tpu_d),
    .rq_peek_valid, .rq_take, .rq_inj_valid, .rq_inj_ready,
    .dt_peek_valid, .dt_peek_data, .dt_take, .dt_inj_valid, .dt_inj_data, .dt_inj_ready,
    .n_requests(n_req), .n_steals_served(n_steal), .n_offloads(n_off), .n_received(n_rcv));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // the ring slot the client injects into is free unless the test says so
  assign rq_inj_ready = 1'b1;
  assign dt_inj_ready = !dt_peek_valid || dt_take;

  task automatic spawn(logic [W-1:0] v);
    @(negedge clk); hpu_v = 1; hpu_d = v;
    @(negedge clk); hpu_v = 0;
  endtask

  initial begin
    {hpu_v, hpo_r, rq_peek_valid, dt_peek_valid} = '0;
    hpu_d = '0; dt_peek_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    #1;
    // empty queue: asks for work, once
    check(rq_inj_valid, "request raised on empty queue");
    @(negedge clk);
    check(!rq_inj_valid, "single outstanding request");
    check(n_req == 1, "request counted");
    // a task passes: taken into the queue
    dt_peek_valid = 1; dt_peek_data = 32'hA1; #1;
    check(dt_take && tpu_v, "task taken while waiting");
    @(negedge clk); dt_peek_valid = 0; #1;
    check(count == 1 && hpo_d == 32'hA1, "received task queued for the PE");
    check(n_rcv == 1, "receive counted");
    // not waiting any more: passing tasks are left alone
    dt_peek_valid = 1; dt_peek_data = 32'hB2; #1;
    check(!dt_take, "no take when not waiting");
    @(negedge clk); dt_peek_valid = 0;
    // one task only: a steal request is not served
    rq_peek_valid = 1; #1;
    check(!rq_take && !dt_inj_valid, "no steal with one task");
    @(negedge clk); rq_peek_valid = 0;
    // PE spawns two more: 3 tasks, oldest is A1
    spawn(32'hC3); spawn(32'hD4);
    rq_peek_valid = 1; #1;
    check(rq_take && dt_inj_valid && dt_inj_data == 32'hA1, "steal served with oldest task");
    @(negedge clk); rq_peek_valid = 0; #1;
    check(count == 2 && n_steal == 1, "steal counted, task left the queue");
    check(!dt_inj_valid, "no offload below threshold");
    // fill to DEPTH-2: offload without request
    for (int i = 0; i < 4; i++) spawn(32'hE0 + i);
    #1;
    check(count == DEPTH - 2 || n_off > 0, "queue filled");
    repeat (3) @(negedge clk);
    check(n_off >= 1, "near-full queue offloads");
    check(count < DEPTH - 2, "offload brings queue below threshold");
    check(n_req == 1, "no request while the queue has work");
    // drain by the PE: the client asks again
    hpo_r = 1;
    while (count != 0) @(negedge clk);
    hpo_r = 0;
    repeat (2) @(negedge clk);
    check(n_req == 2, "second request after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
