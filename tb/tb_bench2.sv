// tb_bench2: knary Benchmark 2 with two task types on two work-stealing
// schedulers. 14 PEs execute the tree task (type 1) and 14 PEs execute the
// leaf work task (type 2); each scheduler has 4 servers. The type-1 PEs
// reach the type-2 scheduler through its 14 spawn-only clients.
//
// A type-1 task of depth 0 works DELAY/2 cycles and spawns one type-2 task;
// a deeper one, BRANCH times, works DELAY/2 cycles, spawns a type-2 task and
// spawns a type-1 child of depth - 1. A type-2 task works DELAY/2 cycles.
// The run is repeated for DELAY = 8, 32, 64 and 256 cycles; efficiency is
// total work / (28 x elapsed cycles). Checks: every task of both types runs
// exactly once, the work matches the tree, efficiency rises with task size
// and is above 90 % for 256-cycle tasks. The 14/14 split and the tree shape
// (DEPTH 5, BRANCH 6) are this testbench's choices.
module tb_bench2;
  import hc_pkg::*;
  localparam int unsigned N1 = 14, N2 = 14, NS = 4, W = 32;
  localparam int unsigned TREE_DEPTH = 5, BRANCH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // type-1 scheduler (tree tasks)
  logic av [N1], ar [N1], asv [N1], asr [N1]; logic [W-1:0] ad [N1], asd [N1];
  logic apv [1], apr [1]; logic [W-1:0] apd [1];
  // type-2 scheduler (work tasks), spawn-only clients fed by type-1 PEs
  logic bv [N2], br [N2], bsv [N2], bsr [N2]; logic [W-1:0] bd [N2], bsd [N2];
  logic bpv [N1], bpr [N1]; logic [W-1:0] bpd [N1];
  addr_t acb [NS], bcb [NS]; logic [31:0] acs [NS], bcs [NS];
  logic amv [NS], amr [NS], arv [NS], bmv [NS], bmr [NS], brv [NS];
  mem_req_t amq [NS], bmq [NS]; logic [W-1:0] ardw [NS], brdw [NS]; task_t ard [NS], brd [NS];
  logic [31:0] a_req, a_steal, a_off, a_abs, a_srv, b_req, b_steal, b_off, b_abs, b_srv;

  scheduler #(.NUM_PE(N1), .NUM_SPAWN(0), .NUM_SERVERS(NS), .TASK_W(W)) u_s1 (
    .clk, .rst_n,
    .pe_task_valid(av), .pe_task_ready(ar), .pe_task_data(ad),
    .pe_spawn_valid(asv), .pe_spawn_ready(asr), .pe_spawn_data(asd),
    .sp_valid(apv), .sp_ready(apr), .sp_data(apd),
    .cfg_base(acb), .cfg_size(acs),
    .mem_req_valid(amv), .mem_req_ready(amr), .mem_req(amq), .mem_resp_valid(arv), .mem_resp_data(ardw),
    .tot_requests(a_req), .tot_steals(a_steal), .tot_offloads(a_off), .tot_absorbed(a_abs), .tot_mem_served(a_srv));
  scheduler #(.NUM_PE(N2), .NUM_SPAWN(N1), .NUM_SERVERS(NS), .TASK_W(W)) u_s2 (
    .clk, .rst_n,
    .pe_task_valid(bv), .pe_task_ready(br), .pe_task_data(bd),
    .pe_spawn_valid(bsv), .pe_spawn_ready(bsr), .pe_spawn_data(bsd),
    .sp_valid(bpv), .sp_ready(bpr), .sp_data(bpd),
    .cfg_base(bcb), .cfg_size(bcs),
    .mem_req_valid(bmv), .mem_req_ready(bmr), .mem_req(bmq), .mem_resp_valid(brv), .mem_resp_data(brdw),
    .tot_requests(b_req), .tot_steals(b_steal), .tot_offloads(b_off), .tot_absorbed(b_abs), .tot_mem_served(b_srv));
  tb_mem_model #(.PORTS(NS), .WORDS(8192), .LATENCY(10)) u_mem1 (
    .clk, .rst_n, .mem_req_valid(amv), .mem_req_ready(amr), .mem_req(amq), .mem_resp_valid(arv), .mem_resp_data(ard));
  tb_mem_model #(.PORTS(NS), .WORDS(8192), .LATENCY(10)) u_mem2 (
    .clk, .rst_n, .mem_req_valid(bmv), .mem_req_ready(bmr), .mem_req(bmq), .mem_resp_valid(brv), .mem_resp_data(brd));
  for (genvar s = 0; s < NS; s++) begin : g_rd
    assign ardw[s] = ard[s][W-1:0];
    assign brdw[s] = brd[s][W-1:0];
  end
  assign apv[0] = 1'b0;
  assign apd[0] = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int unsigned half = 4;
  longint unsigned work = 0, done1 = 0, done2 = 0;
  bit hold0 = 1, host_v = 0;

  // type-1 PEs: work, spawn a type-2 task, then (if depth > 0) a type-1 child
  for (genvar p = 0; p < N1; p++) begin : g_pe1
    int st = 0, cnt = 0, iter = 0; logic [W-1:0] depth;
    always_comb begin
      ar[p] = (st == 0) && !(p == 0 && hold0);
      bpv[p] = (st == 2);
      bpd[p] = '0;
      if (p == 0 && hold0) begin asv[p] = host_v; asd[p] = W'(TREE_DEPTH); end
      else begin asv[p] = (st == 3); asd[p] = depth - 1; end
    end
    always @(posedge clk) if (rst_n) begin
      case (st)
        0: if (av[p] && ar[p]) begin depth <= ad[p]; cnt <= half; iter <= 0; st <= 1; end
        1: begin
             work++;
             if (cnt > 1) cnt <= cnt - 1;
             else st <= 2;
           end
        2: if (bpr[p]) begin
             if (depth == 0) begin done1++; st <= 0; end
             else st <= 3;
           end
        3: if (asr[p]) begin
             if (iter + 1 == BRANCH) begin done1++; st <= 0; end
             else begin iter <= iter + 1; cnt <= half; st <= 1; end
           end
        default: st <= 0;
      endcase
    end
  end

  // type-2 PEs: work only
  for (genvar p = 0; p < N2; p++) begin : g_pe2
    int st = 0, cnt = 0;
    assign br[p] = (st == 0);
    assign bsv[p] = 1'b0;
    assign bsd[p] = '0;
    always @(posedge clk) if (rst_n) begin
      case (st)
        0: if (bv[p]) begin cnt <= half; st <= 1; end
        default: begin
             work++;
             if (cnt > 1) cnt <= cnt - 1;
             else begin done2++; st <= 0; end
           end
      endcase
    end
  end

  function automatic longint unsigned leaves();
    longint unsigned lvl = 1;
    for (int d = 0; d < TREE_DEPTH; d++) lvl *= BRANCH;
    return lvl;
  endfunction
  function automatic longint unsigned tree_size();
    longint unsigned n = 0, lvl = 1;
    for (int d = 0; d <= TREE_DEPTH; d++) begin n += lvl; lvl *= BRANCH; end
    return n;
  endfunction

  real eff [4];
  initial begin
    automatic int unsigned delays [4] = '{8, 32, 64, 256};
    automatic longint unsigned n2 = (tree_size() - leaves()) * BRANCH + leaves();
    for (int s = 0; s < NS; s++) begin
      acb[s] = 64'(s) * 64'h8000; acs[s] = 1024;
      bcb[s] = 64'(s) * 64'h8000; bcs[s] = 1024;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      automatic longint unsigned t0, t1, w0 = work, d10 = done1, d20 = done2;
      @(negedge clk);
      half = delays[r] / 2;
      hold0 = 1; host_v = 1;
      while (!asr[0]) @(negedge clk);
      @(posedge clk); #1 host_v = 0; hold0 = 0;
      t0 = $time / 10;
      while (done1 - d10 < tree_size() || done2 - d20 < n2) @(posedge clk);
      t1 = $time / 10;
      eff[r] = real'(work - w0) / (real'(N1 + N2) * real'(t1 - t0));
      $display("bench2 delay %0d: %0d + %0d tasks in %0d cycles, efficiency %0.3f",
               delays[r], done1 - d10, done2 - d20, t1 - t0, eff[r]);
      repeat (20) @(posedge clk);
      check(done1 - d10 == tree_size(), "every type-1 task executed once");
      check(done2 - d20 == n2, "every type-2 task executed once");
      check(work - w0 == 2 * n2 * half, "work equals the tree's work");
    end
    $display("type 1: requests %0d steals %0d offloads %0d absorbed %0d", a_req, a_steal, a_off, a_abs);
    $display("type 2: requests %0d steals %0d offloads %0d absorbed %0d", b_req, b_steal, b_off, b_abs);
    check(b_off > 0, "spawn-only clients offloaded type-2 tasks");
    check(eff[3] > eff[0], "efficiency grows with task size");
    check(eff[3] > 0.90, "efficiency above 90% with 256-cycle tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
