// tb_argument_notifier: three PE clients and two sharded servers. 24
// closures with join counters 1..3 are set up in the memory model; the PEs
// send one notification per missing argument, in random order and at random
// times. Checks: each closure is delivered as a ready task exactly once,
// only after all its notifications were sent, every counter ends at zero,
// and both servers did work.
module tb_argument_notifier;
  import hc_pkg::*;
  localparam int unsigned NC = 3, NS = 2, NCL = 24;
  localparam addr_t CB = 64'h1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pv [NC], pr [NC]; addr_t pd [NC];
  logic tv [NS], tr [NS]; task_t td [NS];
  logic mv [NS], mr [NS], rv [NS]; mem_req_t mq [NS]; task_t rd [NS];
  logic [31:0] n_not, n_rdy;

  argument_notifier #(.NUM_CLIENTS(NC), .NUM_SERVERS(NS)) dut (
    .clk, .rst_n, .pe_valid(pv), .pe_ready(pr), .pe_data(pd), .task_valid(tv), .task_ready(tr), .task_data(td),
    .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd),
    .tot_notified(n_not), .tot_ready(n_rdy));
  tb_mem_model #(.PORTS(NS), .WORDS(1024), .LATENCY(6)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int need [NCL], sent_cnt [NCL], got [NCL], per_srv [NS];
  int unsigned total_sent = 0;
  int todo [$];

  always @(posedge clk) if (rst_n) for (int s = 0; s < NS; s++) if (tv[s] && tr[s]) begin
    automatic int id = int'(td[s][15:0]);
    got[id]++; per_srv[s]++;
    checks++;
    if (sent_cnt[id] != need[id]) begin failures++; $display("FAIL closure %0d ready early", id); end
  end

  // PE c sends notifications from the shared to-do list
  for (genvar c = 0; c < NC; c++) begin : g_pe
    int cur = -1;
    always @(posedge clk) if (rst_n) begin
      if (cur >= 0) begin
        if (pr[c]) begin sent_cnt[cur]++; total_sent++; cur <= -1; end
      end else if (todo.size() > 0 && ($urandom % 3 == 0)) cur <= todo.pop_front();
    end
    assign pv[c] = (cur >= 0);
    assign pd[c] = CB + addr_t'(cur) * 64 + 32 + 8;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin tr[s] = 1; per_srv[s] = 0; end
    #1;
    for (int i = 0; i < NCL; i++) begin
      need[i] = 1 + i % 3; sent_cnt[i] = 0; got[i] = 0;
      u_mem.mem[int'((CB + i * 64) / 32)] = task_t'(need[i]);
      u_mem.mem[int'((CB + i * 64) / 32) + 1] = task_t'(i);
      for (int k = 0; k < need[i]; k++) todo.push_back(i);
    end
    todo.shuffle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) tr[s] = ($urandom % 4) != 0;
    end
    for (int i = 0; i < NCL; i++) begin
      check(got[i] == 1, "closure delivered exactly once");
      check(u_mem.mem[int'((CB + i * 64) / 32)][31:0] == 0, "join counter at zero");
    end
    for (int s = 0; s < NS; s++) check(per_srv[s] > 0, "each server delivered");
    check(n_not == total_sent && n_rdy == NCL, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
