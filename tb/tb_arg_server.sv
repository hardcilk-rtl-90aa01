// tb_arg_server: server 1 of 2 shards. Closures live in the memory model
// (join counter in word 0, task in word 1). Addresses of argument slots are
// offered on the ring. Checks: only addresses of its shard are taken; each
// notification decrements the join counter in memory; a closure whose
// counter reaches zero is delivered as a task with its memory contents; one
// that does not reach zero is not.
module tb_arg_server;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic peek_valid, take, task_valid, task_ready;
  addr_t peek_data; task_t task_data;
  logic mv [1], mr [1], rv [1]; mem_req_t mq [1]; task_t rd [1];
  logic [31:0] n_not, n_rdy;

  arg_server #(.NUM_SHARDS(2), .SHARD(1)) dut (
    .clk, .rst_n, .peek_valid, .peek_data, .take, .task_valid, .task_ready, .task_data,
    .mem_req_valid(mv[0]), .mem_req_ready(mr[0]), .mem_req(mq[0]), .mem_resp_valid(rv[0]), .mem_resp_data(rd[0]),
    .n_notified(n_not), .n_ready(n_rdy));
  tb_mem_model #(.PORTS(1), .WORDS(256), .LATENCY(4)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // offer an address until taken (or for `tries` cycles); return whether taken
  task automatic notify(addr_t a, int tries, output bit taken);
    taken = 0;
    for (int i = 0; i < tries && !taken; i++) begin
      @(negedge clk); peek_valid = 1; peek_data = a; #1 taken = take;
    end
    @(negedge clk); peek_valid = 0;
  endtask

  function automatic logic [31:0] join_of(addr_t c); return u_mem.mem[int'(c / 32)][31:0]; endfunction

  task_t delivered [$];
  always @(posedge clk) if (rst_n && task_valid && task_ready) delivered.push_back(task_data);

  initial begin
    automatic bit t;
    // closure index 1 (0x40) and 3 (0xC0) are shard 1; index 2 (0x80) is shard 0
    peek_valid = 0; peek_data = '0; task_ready = 1;
    #1;
    u_mem.mem[2] = task_t'(3); u_mem.mem[3] = {224'h0, 32'hCAFE_0001};
    u_mem.mem[6] = task_t'(1); u_mem.mem[7] = {224'h0, 32'hCAFE_0003};
    u_mem.mem[4] = task_t'(1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    notify(64'h80 + 40, 3, t); check(!t, "other shard's address not taken");
    notify(64'h40 + 40, 50, t); check(t, "own shard taken");
    repeat (20) @(negedge clk);
    check(join_of(64'h40) == 2, "join counter decremented to 2");
    check(delivered.size() == 0, "not ready yet");
    notify(64'h40 + 44, 50, t); check(t, "second argument taken");
    repeat (20) @(negedge clk);
    check(join_of(64'h40) == 1, "join counter decremented to 1");
    notify(64'hC0 + 40, 50, t); check(t, "other closure taken");
    repeat (25) @(negedge clk);
    check(join_of(64'hC0) == 0, "second closure counter reached 0");
    check(delivered.size() == 1 && delivered[0][31:0] == 32'hCAFE_0003, "ready closure delivered as task");
    task_ready = 0;
    notify(64'h40 + 48, 50, t); check(t, "third argument taken");
    repeat (25) @(negedge clk);
    check(task_valid && task_data[31:0] == 32'hCAFE_0001, "task offered and held until accepted");
    notify(64'hC0 + 40, 5, t); check(!t, "busy server takes nothing");
    task_ready = 1;
    repeat (3) @(negedge clk);
    check(delivered.size() == 2 && n_rdy == 2 && n_not == 4, "counters");
    check(join_of(64'h80) == 1, "other shard's closure untouched");
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
