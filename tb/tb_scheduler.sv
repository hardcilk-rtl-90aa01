// tb_scheduler: a scheduler with 4 execute PEs, 1 spawn-only port and 1
// server (memory model attached). The testbench pushes 300 numbered tasks:
// a burst into the spawn-only port and a burst into PE 0's spawn port while
// PE 0 is held, then lets all PEs run (each task takes a few cycles; some
// tasks spawn a child). Checks: every task, including every child, runs
// exactly once; work spreads over all PEs (stealing); offload, absorption
// into memory and serving from memory all happen.
module tb_scheduler;
  import hc_pkg::*;
  localparam int unsigned NPE = 4, W = 32, NT = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tv [NPE], tr [NPE], sv [NPE], sr [NPE]; logic [W-1:0] td [NPE], sd [NPE];
  logic pv [1], pr [1]; logic [W-1:0] pd [1];
  addr_t cb [1]; logic [31:0] cs [1];
  logic mv [1], mr [1], rv [1]; mem_req_t mq [1]; logic [W-1:0] rdw [1]; task_t rd [1];
  logic [31:0] t_req, t_steal, t_off, t_abs, t_srv;
  mem_req_t mq_w [1];

  scheduler #(.NUM_PE(NPE), .NUM_SPAWN(1), .NUM_SERVERS(1), .DEPTH(8), .SPAWN_DEPTH(4), .TASK_W(W)) dut (
    .clk, .rst_n,
    .pe_task_valid(tv), .pe_task_ready(tr), .pe_task_data(td),
    .pe_spawn_valid(sv), .pe_spawn_ready(sr), .pe_spawn_data(sd),
    .sp_valid(pv), .sp_ready(pr), .sp_data(pd),
    .cfg_base(cb), .cfg_size(cs),
    .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rdw),
    .tot_requests(t_req), .tot_steals(t_steal), .tot_offloads(t_off), .tot_absorbed(t_abs), .tot_mem_served(t_srv));
  tb_mem_model #(.PORTS(1), .WORDS(1024), .LATENCY(8)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));
  assign rdw[0] = rd[0][W-1:0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int runs [int];
  int per_pe [NPE];
  int expected = 0;
  bit hold0 = 1;
  logic [W-1:0] host_d; bit host_v = 0;

  // task word: [15:0] id, bit 16 = spawns a child with id + 1000
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    int st = 0, cnt = 0; logic [W-1:0] cur;
    always_comb begin
      tr[p] = (st == 0) && !(p == 0 && hold0);
      if (p == 0 && hold0) begin sv[p] = host_v; sd[p] = host_d; end
      else begin sv[p] = (st == 2); sd[p] = W'(cur[15:0] + 1000); end
    end
    always @(posedge clk) if (rst_n) begin
      case (st)
        0: if (tv[p] && tr[p]) begin cur <= td[p]; cnt <= 3 + p; st <= 1; end
        1: if (cnt > 0) cnt <= cnt - 1;
           else begin
             runs[int'(cur[15:0])] = runs.exists(int'(cur[15:0])) ? runs[int'(cur[15:0])] + 1 : 1;
             per_pe[p]++;
             st <= cur[16] ? 2 : 0;
           end
        2: if (sr[p]) st <= 0;
        default: st <= 0;
      endcase
    end
  end

  initial begin
    automatic int done;
    pv[0] = 0; pd[0] = '0; cb[0] = 64'h0; cs[0] = 512; host_d = '0;
    for (int p = 0; p < NPE; p++) per_pe[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // burst through the spawn-only port
    for (int i = 0; i < NT / 2; i++) begin
      pv[0] = 1; pd[0] = W'(i) | ((i % 5 == 0) ? 32'h1_0000 : 0);
      @(negedge clk); while (!pr[0]) @(negedge clk);
      @(posedge clk); #1;
    end
    pv[0] = 0;
    // burst through PE 0's spawn port while PE 0 does not execute
    for (int i = NT / 2; i < NT; i++) begin
      host_v = 1; host_d = W'(i) | ((i % 5 == 0) ? 32'h1_0000 : 0);
      @(negedge clk); while (!sr[0]) @(negedge clk);
      @(posedge clk); #1;
    end
    host_v = 0; hold0 = 0;
    expected = NT + NT / 5;
    done = 0;
    while (runs.size() < expected) @(posedge clk);
    repeat (50) @(posedge clk);
    foreach (runs[id]) begin
      checks++;
      if (runs[id] != 1) begin failures++; $display("FAIL task %0d ran %0d times", id, runs[id]); end
    end
    check(runs.size() == expected, "every task ran");
    for (int p = 0; p < NPE; p++) check(per_pe[p] > 0, "every PE got work");
    $display("requests %0d steals %0d offloads %0d absorbed %0d served %0d", t_req, t_steal, t_off, t_abs, t_srv);
    check(t_steal > 0, "steals served");
    check(t_off > 0, "offloads");
    check(t_abs > 0, "absorbed into memory");
    check(t_srv > 0, "served from memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: %0d tasks ran", runs.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
