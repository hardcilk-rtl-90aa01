// tb_bench3: knary Benchmark 3, which adds serial dependences to the task
// tree and so exercises the closure allocator and the argument notifier
// together with the work-stealing scheduler. 28 PEs of one task type;
// scheduler with 4 servers, closure allocator with 1 server, argument
// notifier with 4 servers whose ready tasks enter the scheduler through 4
// spawn-only clients. One memory model (latency 10, random stalls) serves
// all 9 server ports.
//
// Task word: [7:0] depth, [15:8] first iteration, [79:16] address of the
// closure to notify when this logical task ends (0 = none). A task of depth
// 0 works DELAY cycles, then notifies. A deeper task runs iterations
// i = first .. BRANCH-1, each DELAY cycles of work followed by a child of
// depth - 1. For i < SERIAL the rest of the loop must wait for that child:
// the PE takes an empty closure, writes into it join counter 1 and the task
// "same depth, first = i+1, same notify address" (spawn_next; the PE writes
// the closure itself), spawns the child with the closure as its notify
// address and ends. Other children are spawned with no notify address. A
// task that finishes its last iteration notifies its own closure, if any.
// When the notifier sees the counter reach zero, the continuation becomes a
// ready task of the same type.
//
// The run is repeated for DELAY = 8, 32, 64 and 256 cycles with fresh
// closures. Checks per run: the number of executed tasks, the work, the
// closures used and the tasks made ready all match the tree. Overall:
// efficiency rises with task size and is above 85 % for 256-cycle tasks.
// DEPTH 5, BRANCH 6, SERIAL 1 (which keeps the parallelism, work over
// critical path, above 500, i.e. well above the PE count) and the task word layout are this testbench's
// choices.
module tb_bench3;
  import hc_pkg::*;
  localparam int unsigned NPE = 28, NS = 4, CS = 1, AS = 4, NP = NS + CS + AS;
  localparam int unsigned TREE_DEPTH = 5, BRANCH = 6, SERIAL = 1, RUNS = 4;
  localparam int unsigned INTERNAL = 1555, LEAVES = 7776;           // 6^0+..+6^4, 6^5
  // every run gets its own closures, plus slack for the addresses that stay
  // prefetched in allocator clients at the end of a run
  localparam int unsigned NCL_RUN = INTERNAL * SERIAL, NCL = NCL_RUN * RUNS + 4 * NPE;
  localparam addr_t LIST_BASE = 64'h2_0000, CL_BASE = 64'h4_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tv [NPE], tr [NPE], sv [NPE], sr [NPE]; task_t td [NPE], sd [NPE];
  logic rv_ [AS], rr_ [AS]; task_t rdt [AS];
  logic cv [NPE], cr [NPE]; addr_t cd [NPE];
  logic av [NPE], ar [NPE]; addr_t ad [NPE];
  addr_t qb [NS]; logic [31:0] qs [NS];
  addr_t lb [CS]; logic [31:0] ll [CS];
  logic mv [NP], mr [NP], pv [NP]; mem_req_t mq [NP]; task_t pd [NP];
  logic [31:0] t_req, t_steal, t_off, t_abs, t_srv, t_iss, t_not, t_rdy;

  scheduler #(.NUM_PE(NPE), .NUM_SPAWN(AS), .NUM_SERVERS(NS)) u_sched (
    .clk, .rst_n,
    .pe_task_valid(tv), .pe_task_ready(tr), .pe_task_data(td),
    .pe_spawn_valid(sv), .pe_spawn_ready(sr), .pe_spawn_data(sd),
    .sp_valid(rv_), .sp_ready(rr_), .sp_data(rdt),
    .cfg_base(qb), .cfg_size(qs),
    .mem_req_valid(mv[0:NS-1]), .mem_req_ready(mr[0:NS-1]), .mem_req(mq[0:NS-1]),
    .mem_resp_valid(pv[0:NS-1]), .mem_resp_data(pd[0:NS-1]),
    .tot_requests(t_req), .tot_steals(t_steal), .tot_offloads(t_off), .tot_absorbed(t_abs), .tot_mem_served(t_srv));
  closure_allocator #(.NUM_CLIENTS(NPE), .NUM_SERVERS(CS)) u_alloc (
    .clk, .rst_n, .pe_valid(cv), .pe_ready(cr), .pe_data(cd),
    .cfg_list_base(lb), .cfg_list_len(ll),
    .mem_req_valid(mv[NS:NS+CS-1]), .mem_req_ready(mr[NS:NS+CS-1]), .mem_req(mq[NS:NS+CS-1]),
    .mem_resp_valid(pv[NS:NS+CS-1]), .mem_resp_data(pd[NS:NS+CS-1]),
    .tot_issued(t_iss));
  argument_notifier #(.NUM_CLIENTS(NPE), .NUM_SERVERS(AS)) u_args (
    .clk, .rst_n, .pe_valid(av), .pe_ready(ar), .pe_data(ad),
    .task_valid(rv_), .task_ready(rr_), .task_data(rdt),
    .mem_req_valid(mv[NS+CS:NP-1]), .mem_req_ready(mr[NS+CS:NP-1]), .mem_req(mq[NS+CS:NP-1]),
    .mem_resp_valid(pv[NS+CS:NP-1]), .mem_resp_data(pd[NS+CS:NP-1]),
    .tot_notified(t_not), .tot_ready(t_rdy));
  tb_mem_model #(.PORTS(NP), .WORDS(34000), .LATENCY(10)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(pv), .mem_resp_data(pd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic task_t mk(int unsigned depth, int unsigned first, addr_t k);
    task_t t = '0;
    t[7:0] = 8'(depth); t[15:8] = 8'(first); t[79:16] = k;
    return t;
  endfunction

  int unsigned delay = 8;
  longint unsigned work = 0, done_tasks = 0, cl_written = 0;
  bit hold0 = 1, host_v = 0;

  localparam int S_IDLE = 0, S_WORK = 1, S_NEXT = 2, S_CLOS = 3, S_SPAWN = 4, S_NOTIFY = 5;
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    int st = S_IDLE, cnt = 0, iter = 0;
    int unsigned depth; addr_t k, child_k; bit ends;
    always_comb begin
      tr[p] = (st == S_IDLE) && !(p == 0 && hold0);
      cr[p] = (st == S_CLOS);
      av[p] = (st == S_NOTIFY);
      ad[p] = k;
      if (p == 0 && hold0) begin sv[p] = host_v; sd[p] = mk(TREE_DEPTH, 0, '0); end
      else begin sv[p] = (st == S_SPAWN); sd[p] = mk(depth - 1, 0, child_k); end
    end
    always @(posedge clk) if (rst_n) begin
      case (st)
        S_IDLE: if (tv[p] && tr[p]) begin
                  depth <= td[p][7:0]; iter <= td[p][15:8]; k <= td[p][79:16];
                  cnt <= delay; st <= S_WORK;
                end
        S_WORK: begin
                  work++;
                  if (cnt > 1) cnt <= cnt - 1;
                  else st <= S_NEXT;
                end
        S_NEXT: if (depth == 0) st <= (k != 0) ? S_NOTIFY : S_IDLE;
                else if (iter < SERIAL) st <= S_CLOS;
                else begin child_k <= '0; ends <= (iter + 1 == BRANCH); st <= S_SPAWN; end
        S_CLOS: if (cv[p]) begin      // spawn_next: fill the continuation closure
                  automatic int unsigned w = int'(cd[p] / 32);
                  u_mem.mem[w] = '0;
                  u_mem.mem[w][31:0] = 32'd1;
                  u_mem.mem[w + 1] = mk(depth, iter + 1, k);
                  cl_written++;
                  child_k <= cd[p]; ends <= 1'b1; st <= S_SPAWN;
                end
        S_SPAWN: if (sr[p]) begin
                  if (ends && child_k != 0) st <= S_IDLE;          // continuation waits for the child
                  else if (ends) st <= (k != 0) ? S_NOTIFY : S_IDLE;
                  else begin iter <= iter + 1; cnt <= delay; st <= S_WORK; end
                end
        S_NOTIFY: if (ar[p]) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
      if ((st == S_NEXT && depth == 0 && k == 0) || (st == S_NOTIFY && ar[p]) ||
          (st == S_SPAWN && sr[p] && ends && (child_k != 0 || k == 0)))
        done_tasks++;
    end
  end

  real eff [RUNS];
  initial begin
    automatic int unsigned delays [RUNS] = '{8, 32, 64, 256};
    for (int s = 0; s < NS; s++) begin qb[s] = 64'(s) * 64'h8000; qs[s] = 1024; end
    lb[0] = LIST_BASE; ll[0] = NCL;   // whole list up front: no closure recycling
    for (int i = 0; i < NCL; i++) begin
      automatic addr_t a = LIST_BASE + 64'(i) * 8;
      u_mem.mem[int'(a / 32)][(a % 32) * 8 +: 64] = CL_BASE + 64'(i) * 64;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < RUNS; r++) begin
      automatic longint unsigned t0, t1, w0 = work, d0 = done_tasks, c0 = cl_written;
      automatic longint unsigned rdy0 = t_rdy, not0 = t_not;
      @(negedge clk);
      delay = delays[r];
      hold0 = 1; host_v = 1;
      while (!sr[0]) @(negedge clk);
      @(posedge clk); #1 host_v = 0; hold0 = 0;
      t0 = $time / 10;
      while (done_tasks - d0 < LEAVES + INTERNAL * (SERIAL + 1)) @(posedge clk);
      t1 = $time / 10;
      eff[r] = real'(work - w0) / (real'(NPE) * real'(t1 - t0));
      $display("bench3 delay %0d: %0d tasks, %0d closures in %0d cycles, efficiency %0.3f",
               delays[r], done_tasks - d0, cl_written - c0, t1 - t0, eff[r]);
      repeat (100) @(posedge clk);
      check(done_tasks - d0 == LEAVES + INTERNAL * (SERIAL + 1), "every task executed once");
      check(work - w0 == longint'(INTERNAL * BRANCH + LEAVES) * delay, "work equals the tree's work");
      check(cl_written - c0 == NCL_RUN, "one closure per serial dependence");
      check(t_not - not0 == NCL_RUN && t_rdy - rdy0 == NCL_RUN, "every closure notified once and made ready");
    end
    $display("scheduler: requests %0d steals %0d offloads %0d absorbed %0d served %0d; closures issued %0d",
             t_req, t_steal, t_off, t_abs, t_srv, t_iss);
    check(eff[RUNS-1] > eff[0], "efficiency grows with task size");
    check(eff[RUNS-1] > 0.85, "efficiency above 85% with 256-cycle tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: tasks %0d closures %0d notified %0d ready %0d issued %0d absorbed %0d served %0d",
             done_tasks, cl_written, t_not, t_rdy, t_iss, t_abs, t_srv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
