// tb_sched_server: directed test of the scheduler server with the memory
// model. Young tasks on the data ring are ignored; tasks whose hop count
// reached ABSORB_AGE are taken and written to the memory queue (checked in
// the memory array); steal requests are served from memory, oldest first,
// after the memory latency; the queue stops absorbing when its region is
// full, and requests are ignored when it is empty.
module tb_sched_server;
  import hc_pkg::*;
  localparam int unsigned AGE = 4;
  localparam addr_t BASE = 64'h400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rq_peek_valid, rq_take, dt_peek_valid, dt_take, dt_inj_valid, dt_inj_ready;
  task_t dt_peek_data, dt_inj_data;
  logic [7:0] dt_peek_age;
  logic mv [1], mr [1], rv [1]; mem_req_t mq [1]; task_t rd [1];
  logic [31:0] cfg_size, mq_count, n_abs, n_srv;

  sched_server #(.ABSORB_AGE(AGE)) dut (
    .clk, .rst_n, .cfg_base(BASE), .cfg_size,
    .rq_peek_valid, .rq_take, .dt_peek_valid, .dt_peek_data, .dt_peek_age, .dt_take,
    .dt_inj_valid, .dt_inj_data, .dt_inj_ready,
    .mem_req_valid(mv[0]), .mem_req_ready(mr[0]), .mem_req(mq[0]),
    .mem_resp_valid(rv[0]), .mem_resp_data(rd[0]),
    .mq_count, .n_absorbed(n_abs), .n_served(n_srv));
  tb_mem_model #(.PORTS(1), .WORDS(256), .LATENCY(6)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic offer(task_t v, int age, output bit taken);
    @(negedge clk); dt_peek_valid = 1; dt_peek_data = v; dt_peek_age = 8'(age);
    #1 taken = dt_take;
    @(negedge clk); dt_peek_valid = 0;
  endtask

  task automatic steal(output task_t got, output int lat);
    @(negedge clk); rq_peek_valid = 1;
    #1 if (!rq_take) begin got = '0; lat = -1; @(negedge clk); rq_peek_valid = 0; return; end
    @(negedge clk); rq_peek_valid = 0;
    lat = 1;
    while (!dt_inj_valid) begin @(negedge clk); lat++; end
    got = dt_inj_data;
    @(negedge clk);
  endtask

  initial begin
    automatic bit t;
    automatic task_t got;
    automatic int lat;
    {rq_peek_valid, dt_peek_valid} = '0; dt_peek_data = '0; dt_peek_age = '0;
    dt_inj_ready = 1; cfg_size = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    offer(task_t'(32'h11), AGE - 1, t); check(!t, "young task left on the ring");
    offer(task_t'(32'h22), AGE, t);     check(t, "old task absorbed");
    repeat (8) @(negedge clk);
    check(u_mem.mem[BASE / 32] == task_t'(32'h22), "absorbed task written to memory queue slot 0");
    offer(task_t'(32'h33), AGE + 3, t); check(t, "second task absorbed");
    repeat (8) @(negedge clk);
    offer(task_t'(32'h44), AGE, t);     check(t, "third task absorbed");
    repeat (8) @(negedge clk);
    check(mq_count == 3 && n_abs == 3, "memory queue holds three");
    check(u_mem.mem[BASE / 32 + 2] == task_t'(32'h44), "third slot written");
    offer(task_t'(32'h55), AGE, t);     check(!t, "full memory queue absorbs nothing");
    steal(got, lat); check(got == task_t'(32'h22), "first served task is the oldest");
    check(lat >= 6, "served task arrives after the memory latency");
    steal(got, lat); check(got == task_t'(32'h33), "second served task");
    offer(task_t'(32'h66), AGE, t);     check(t, "absorbs again after a slot frees (wraps)");
    repeat (8) @(negedge clk);
    steal(got, lat); check(got == task_t'(32'h44), "third served task");
    steal(got, lat); check(got == task_t'(32'h66), "wrapped task served");
    steal(got, lat); check(lat == -1, "empty memory queue leaves requests alone");
    check(n_srv == 4 && mq_count == 0, "served count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
