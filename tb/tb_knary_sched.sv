// tb_knary_sched: one work-stealing scheduler with NPE behavioural PEs
// running the knary tree workload, used by tb_bench1 at several sizes.
//
// A task carries its depth. A task of depth 0 works DELAY cycles; a deeper
// task, BRANCH times, works DELAY cycles and spawns a child of depth - 1.
// The root is pushed through PE 0's spawn port while PE 0 is held. The tree
// is run four times, for DELAY = 8, 32, 64 and 256 cycles. Per run the
// module checks that the whole tree ran exactly once (task count and work
// cycles) and reports the efficiency, total work / (NPE x elapsed cycles),
// on eff_pm in thousandths. done rises after the last run; checks and
// failures count this module's own checks. Memory: tb_mem_model, latency 10
// with random stalls, one port per scheduler server.
module tb_knary_sched
  import hc_pkg::*;
#(
  parameter int unsigned NPE        = 28,
  parameter int unsigned NS         = 4,
  parameter int unsigned TREE_DEPTH = 5,
  parameter int unsigned BRANCH     = 6
) (
  output bit          done,
  output int          checks,
  output int          failures,
  output int unsigned eff_pm [4]     // efficiency per run, in thousandths
);
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin done = 0; checks = 0; failures = 0; end

  logic tv [NPE], tr [NPE], sv [NPE], sr [NPE]; logic [W-1:0] td [NPE], sd [NPE];
  logic pv [1], pr [1]; logic [W-1:0] pd [1];
  addr_t cb [NS]; logic [31:0] cs [NS];
  logic mv [NS], mr [NS], rv [NS]; mem_req_t mq [NS]; logic [W-1:0] rdw [NS]; task_t rd [NS];
  logic [31:0] t_req, t_steal, t_off, t_abs, t_srv;

  scheduler #(.NUM_PE(NPE), .NUM_SPAWN(0), .NUM_SERVERS(NS), .TASK_W(W)) dut (
    .clk, .rst_n,
    .pe_task_valid(tv), .pe_task_ready(tr), .pe_task_data(td),
    .pe_spawn_valid(sv), .pe_spawn_ready(sr), .pe_spawn_data(sd),
    .sp_valid(pv), .sp_ready(pr), .sp_data(pd),
    .cfg_base(cb), .cfg_size(cs),
    .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rdw),
    .tot_requests(t_req), .tot_steals(t_steal), .tot_offloads(t_off), .tot_absorbed(t_abs), .tot_mem_served(t_srv));
  tb_mem_model #(.PORTS(NS), .WORDS(8192), .LATENCY(10)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));
  for (genvar s = 0; s < NS; s++) begin : g_rd
    assign rdw[s] = rd[s][W-1:0];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int unsigned delay = 8;
  longint unsigned work = 0, done_tasks = 0;
  bit hold0 = 1, host_v = 0;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    int st = 0, cnt = 0, iter = 0; logic [W-1:0] depth;
    always_comb begin
      tr[p] = (st == 0) && !(p == 0 && hold0);
      if (p == 0 && hold0) begin sv[p] = host_v; sd[p] = W'(TREE_DEPTH); end
      else begin sv[p] = (st == 2); sd[p] = depth - 1; end
    end
    always @(posedge clk) if (rst_n) begin
      case (st)
        0: if (tv[p] && tr[p]) begin depth <= td[p]; cnt <= delay; iter <= 0; st <= 1; end
        1: begin                       // working
             work++;
             if (cnt > 1) cnt <= cnt - 1;
             else if (depth == 0) begin done_tasks++; st <= 0; end
             else st <= 2;
           end
        2: if (sr[p]) begin            // spawn the child of this iteration
             if (iter + 1 == BRANCH) begin done_tasks++; st <= 0; end
             else begin iter <= iter + 1; cnt <= delay; st <= 1; end
           end
        default: st <= 0;
      endcase
    end
  end

  function automatic longint unsigned tree_size();
    longint unsigned n = 0, lvl = 1;
    for (int d = 0; d <= TREE_DEPTH; d++) begin n += lvl; lvl *= BRANCH; end
    return n;
  endfunction

  function automatic longint unsigned leaves();
    longint unsigned lvl = 1;
    for (int d = 0; d < TREE_DEPTH; d++) lvl *= BRANCH;
    return lvl;
  endfunction

  real eff [4];
  initial begin
    automatic int unsigned delays [4] = '{8, 32, 64, 256};
    pv[0] = 0; pd[0] = '0;
    for (int s = 0; s < NS; s++) begin cb[s] = 64'(s) * 64'h8000; cs[s] = 1024; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      automatic longint unsigned t0, t1, w0 = work, d0 = done_tasks;
      @(negedge clk);
      delay = delays[r];
      hold0 = 1; host_v = 1;
      while (!sr[0]) @(negedge clk);
      @(posedge clk); #1 host_v = 0; hold0 = 0;
      t0 = $time / 10;
      while (done_tasks - d0 < tree_size()) @(posedge clk);
      t1 = $time / 10;
      eff[r] = real'(work - w0) / (real'(NPE) * real'(t1 - t0));
      $display("%0d PEs, delay %0d: %0d tasks in %0d cycles, efficiency %0.3f", NPE, delay, done_tasks - d0, t1 - t0, eff[r]);
      repeat (20) @(posedge clk);
      check(done_tasks - d0 == tree_size(), "whole tree executed exactly");
      check(work - w0 == ((tree_size() - leaves()) * BRANCH + leaves()) * delay, "work equals the tree's work");
    end
    $display("%0d PEs: requests %0d steals %0d offloads %0d absorbed %0d served %0d",
             NPE, t_req, t_steal, t_off, t_abs, t_srv);
    for (int r = 0; r < 4; r++) eff_pm[r] = int'(eff[r] * 1000.0);
    done = 1;
  end
endmodule
