// tb_hardcilk_fib: end-to-end test of the Fibonacci task-management system at
// its default size (16 fib PEs, 8 sum PEs, 4+4 scheduler servers, 1 closure
// allocator server, 4 argument notifier servers).
//
// The testbench plays the host, the PEs and the memory:
//   * host: writes a free list of empty sum closures, sets the spill regions,
//     creates one root closure per root task (join counter 1, continuation
//     FINAL) and pushes NROOT root tasks fib(n) through fib PE 0's spawn port
//     while that PE is held busy, which fills its queue so that it serves
//     steal requests and offloads, and surplus tasks end in the servers'
//     memory queues;
//   * fib PE: fib(k, n) with n < 2 writes n to address k and notifies k; else
//     takes a closure address c, posts the writes of join counter 2 and
//     continuation k into closure c through its spawn_next write buffer, and
//     spawns fib(c.x, n-1), fib(c.y, n-2);
//   * sum PE: sum(k, x, y) writes x+y to k and notifies k, or, when k is
//     FINAL, reports the root result;
//   * memory: tb_mem_model with latency and random stalls.
// Task words: [63:0] continuation, [95:64] n or x, [127:96] y.
// Checks: every root result equals the Fibonacci number computed here; the
// counts of notifications, ready sum tasks and closures used agree with the
// PEs' own counts; and every mechanism happened at least once (steal
// request, steal served, offload, absorb into memory, serve from memory,
// closure issue, notification, ready task delivery, a spawn held while the
// PE's closure writes are still buffered); and no child is spawned before
// its closure's join counter is in memory.
module tb_hardcilk_fib;
  import hc_pkg::*;
  localparam int unsigned FIB_PES = 16, SUM_PES = 8, FS = 4, SS = 4, CS = 1, AS = 4;
  localparam int unsigned O_WB = FS + SS + CS + AS;
  localparam int unsigned MP = FS + SS + CS + AS + FIB_PES;
  localparam int unsigned NROOT = 60;
  localparam int unsigned DELAY = 8;
  localparam longint unsigned WATCHDOG = 400000;
  localparam addr_t FINAL     = 64'hFFFF_FFF0;
  localparam addr_t FIB_QBASE = 64'h1_0000, SUM_QBASE = 64'h2_0000;
  localparam int unsigned QSLOTS = 256;
  localparam addr_t LIST_BASE = 64'h4_0000, CL_BASE = 64'h10_0000, ROOT_BASE = 64'h1C_0000;
  localparam int unsigned NCLOSURES = 8192;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  fib_task_valid [FIB_PES], fib_task_ready [FIB_PES]; task_t fib_task_data [FIB_PES];
  logic  fib_spawn_valid [FIB_PES], fib_spawn_ready [FIB_PES]; task_t fib_spawn_data [FIB_PES];
  logic  fib_closure_valid [FIB_PES], fib_closure_ready [FIB_PES]; addr_t fib_closure_data [FIB_PES];
  logic  fib_cw_valid [FIB_PES], fib_cw_ready [FIB_PES]; mem_req_t fib_cw_req [FIB_PES];
  logic  fib_arg_valid [FIB_PES], fib_arg_ready [FIB_PES]; addr_t fib_arg_data [FIB_PES];
  logic  sum_task_valid [SUM_PES], sum_task_ready [SUM_PES]; task_t sum_task_data [SUM_PES];
  logic  sum_arg_valid [SUM_PES], sum_arg_ready [SUM_PES]; addr_t sum_arg_data [SUM_PES];
  addr_t fib_q_base [FS]; logic [31:0] fib_q_size [FS];
  addr_t sum_q_base [SS]; logic [31:0] sum_q_size [SS];
  addr_t closure_list_base [CS]; logic [31:0] closure_list_len [CS];
  logic  mem_req_valid [MP], mem_req_ready [MP], mem_resp_valid [MP];
  mem_req_t mem_req [MP]; task_t mem_resp_data [MP];
  logic [31:0] fib_stat [5], sum_stat [5];
  logic [31:0] closures_issued, args_notified, sum_tasks_ready;

  hardcilk_fib dut (.*);

  tb_mem_model #(.PORTS(MP), .WORDS(65536), .LATENCY(10)) u_mem (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data);

  int checks = 0, failures = 0;
  int unsigned n_early_spawn = 0, n_spawn_held = 0;
  int unsigned n_notify_sent = 0, n_closures_used = 0, n_sum_done = 0, n_fib_done = 0;
  int unsigned root_n [NROOT];
  longint unsigned root_result [NROOT];
  bit root_done [NROOT];
  int unsigned roots_done = 0;
  bit hold_pe0 = 1'b1;
  task_t host_task;
  bit    host_push_r = 1'b0;
  typedef enum {F_IDLE, F_WORK, F_CLOSURE, F_CW1, F_CW2, F_SPAWN1, F_SPAWN2, F_NOTIFY} fst_e;
  typedef enum {S_IDLE, S_WORK, S_NOTIFY} sst_e;

  function automatic longint unsigned fibv(int unsigned n);
    longint unsigned a = 0, b = 1, t;
    for (int unsigned i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  // 32-bit write of value v at byte address a (4-byte aligned)
  function automatic void wr32(addr_t a, logic [31:0] v);
    u_mem.mem[int'(a / 32)][(a % 32) * 8 +: 32] = v;
  endfunction
  function automatic void wr64(addr_t a, logic [63:0] v);
    u_mem.mem[int'(a / 32)][(a % 32) * 8 +: 64] = v;
  endfunction

  // ---------------- fib PEs ----------------
  for (genvar p = 0; p < FIB_PES; p++) begin : g_fib
    fst_e st = F_IDLE;
    int unsigned cnt;
    addr_t k, c;
    int unsigned n;
    always_comb begin
      fib_task_ready[p]    = (st == F_IDLE) && !(p == 0 && hold_pe0);
      fib_closure_ready[p] = (st == F_CLOSURE);
      fib_arg_valid[p]     = (st == F_NOTIFY);
      fib_cw_valid[p]      = (st == F_CW1) || (st == F_CW2);
      fib_cw_req[p].we     = 1'b1;
      fib_cw_req[p].addr   = (st == F_CW1) ? c : c + 32;
      fib_cw_req[p].wdata  = (st == F_CW1) ? task_t'(2) : task_t'(k);   // join counter 2 / continuation
      fib_cw_req[p].wstrb  = (st == F_CW1) ? 32'h0000_000F : 32'h0000_00FF;
      fib_arg_data[p]      = k;
      if (p == 0 && hold_pe0) begin
        fib_spawn_valid[p] = host_push_r;
        fib_spawn_data[p]  = host_task;
      end else begin
        fib_spawn_valid[p] = (st == F_SPAWN1) || (st == F_SPAWN2);
        fib_spawn_data[p]  = '0;
        fib_spawn_data[p][63:0]  = c + 32 + ((st == F_SPAWN1) ? 8 : 12);
        fib_spawn_data[p][95:64] = (st == F_SPAWN1) ? n - 1 : n - 2;
      end
    end
    always @(posedge clk) if (rst_n) begin
      case (st)
        F_IDLE: if (fib_task_valid[p] && fib_task_ready[p]) begin
          k <= fib_task_data[p][63:0];
          n <= fib_task_data[p][95:64];
          cnt <= DELAY;
          st <= F_WORK;
        end
        F_WORK: if (cnt > 1) cnt <= cnt - 1; else begin
          n_fib_done++;
          if (n < 2) begin
            wr32(k, n);
            st <= F_NOTIFY;
          end else st <= F_CLOSURE;
        end
        F_CLOSURE: if (fib_closure_valid[p]) begin
          c <= fib_closure_data[p];
          n_closures_used++;
          st <= F_CW1;
        end
        F_CW1: if (fib_cw_ready[p]) st <= F_CW2;
        F_CW2: if (fib_cw_ready[p]) st <= F_SPAWN1;
        F_SPAWN1: if (fib_spawn_ready[p]) begin
          // the closure must already hold its join counter
          if (u_mem.mem[int'(c / 32)][31:0] != 32'd2) n_early_spawn++;
          st <= F_SPAWN2;
        end else if (dut.wb_pending[p]) n_spawn_held++;
        F_SPAWN2: if (fib_spawn_ready[p]) st <= F_IDLE;
        F_NOTIFY: if (fib_arg_ready[p]) begin n_notify_sent++; st <= F_IDLE; end
      endcase
    end
  end

  // ---------------- sum PEs ----------------
  for (genvar p = 0; p < SUM_PES; p++) begin : g_sum
    sst_e st = S_IDLE;
    int unsigned cnt;
    addr_t k;
    logic [31:0] x, y;
    always_comb begin
      sum_task_ready[p] = (st == S_IDLE);
      sum_arg_valid[p]  = (st == S_NOTIFY);
      sum_arg_data[p]   = k;
    end
    always @(posedge clk) if (rst_n) begin
      case (st)
        S_IDLE: if (sum_task_valid[p]) begin
          k <= sum_task_data[p][63:0];
          x <= sum_task_data[p][95:64];
          y <= sum_task_data[p][127:96];
          cnt <= DELAY;
          st <= S_WORK;
        end
        S_WORK: if (cnt > 1) cnt <= cnt - 1; else begin
          n_sum_done++;
          if (k >= FINAL) begin
            root_result[y] = x;
            root_done[y] = 1'b1;
            roots_done++;
            st <= S_IDLE;
          end else begin
            wr32(k, x + y);
            st <= S_NOTIFY;
          end
        end
        S_NOTIFY: if (sum_arg_ready[p]) begin n_notify_sent++; st <= S_IDLE; end
      endcase
    end
  end

  // writes leaving the spawn_next write buffers
  int unsigned wb_writes = 0;
  always @(posedge clk) if (rst_n) for (int i = 0; i < FIB_PES; i++)
    if (mem_req_valid[O_WB+i] && mem_req_ready[O_WB+i]) wb_writes++;

  // ---------------- host ----------------

  initial begin
    for (int i = 0; i < FS; i++) begin fib_q_base[i] = FIB_QBASE + i * QSLOTS * 32; fib_q_size[i] = QSLOTS; end
    for (int i = 0; i < SS; i++) begin sum_q_base[i] = SUM_QBASE + i * QSLOTS * 32; sum_q_size[i] = QSLOTS; end
    closure_list_base[0] = LIST_BASE;
    closure_list_len[0]  = NCLOSURES;
    host_task = '0;
    #1;
    for (int i = 0; i < NCLOSURES; i++) wr64(LIST_BASE + i * 8, CL_BASE + i * 64);
    // root closures: sum(k = FINAL, x = ?, y = root index), join counter 1
    for (int r = 0; r < NROOT; r++) begin
      root_n[r] = 2 + ($urandom % 9);
      root_done[r] = 1'b0;
      wr32(ROOT_BASE + r * 64, 1);
      wr64(ROOT_BASE + r * 64 + 32, FINAL);
      wr32(ROOT_BASE + r * 64 + 44, r);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    #1;
    for (int r = 0; r < NROOT; r++) begin
      host_task = '0;
      host_task[63:0]  = ROOT_BASE + r * 64 + 40;    // root closure's x slot
      host_task[95:64] = root_n[r];
      host_push_r = 1'b1;
      @(negedge clk);
      while (!fib_spawn_ready[0]) @(negedge clk);
      @(posedge clk);
      #1 host_push_r = 1'b0;
    end
    hold_pe0 = 1'b0;   // released one time unit after an edge
    wait (roots_done == NROOT);
    repeat (20) @(posedge clk);
    for (int r = 0; r < NROOT; r++) begin
      checks++;
      if (!root_done[r] || root_result[r] != fibv(root_n[r])) begin
        failures++;
        $display("root %0d: fib(%0d) got %0d expected %0d", r, root_n[r], root_result[r], fibv(root_n[r]));
      end
    end
    checks++; if (args_notified != n_notify_sent) begin failures++; $display("notified %0d vs sent %0d", args_notified, n_notify_sent); end
    checks++; if (sum_tasks_ready != n_closures_used + NROOT) begin failures++; $display("ready %0d vs closures %0d", sum_tasks_ready, n_closures_used); end
    checks++; if (closures_issued < n_closures_used) begin failures++; $display("issued %0d < used %0d", closures_issued, n_closures_used); end
    checks++; if (n_sum_done != n_closures_used + NROOT) begin failures++; $display("sum tasks run %0d", n_sum_done); end
    // every mechanism happened
    $display("fib sched: requests %0d steals %0d offloads %0d absorbed %0d mem_served %0d",
             fib_stat[0], fib_stat[1], fib_stat[2], fib_stat[3], fib_stat[4]);
    $display("sum sched: requests %0d steals %0d offloads %0d absorbed %0d mem_served %0d",
             sum_stat[0], sum_stat[1], sum_stat[2], sum_stat[3], sum_stat[4]);
    $display("spawns held for buffered closure writes: %0d cycles", n_spawn_held);
    $display("closures issued %0d used %0d, notifications %0d, sum tasks ready %0d, fib tasks %0d",
             closures_issued, n_closures_used, args_notified, sum_tasks_ready, n_fib_done);
    checks++; if (fib_stat[0] == 0) begin failures++; $display("no steal request"); end
    checks++; if (fib_stat[1] == 0) begin failures++; $display("no steal served"); end
    checks++; if (fib_stat[2] == 0) begin failures++; $display("no offload of a fib task"); end
    checks++; if (sum_stat[2] == 0) begin failures++; $display("no offload by a spawn-only client"); end
    checks++; if (fib_stat[3] + sum_stat[3] == 0) begin failures++; $display("no absorb to memory"); end
    checks++; if (fib_stat[4] + sum_stat[4] == 0) begin failures++; $display("no task served from memory"); end
    checks++; if (wb_writes != 2 * n_closures_used) begin failures++; $display("write buffers issued %0d writes", wb_writes); end
    checks++; if (n_early_spawn != 0) begin failures++; $display("%0d spawns before their closure was written", n_early_spawn); end
    checks++; if (n_spawn_held == 0) begin failures++; $display("no spawn held for buffered closure writes"); end
    checks++; if (closures_issued == 0) begin failures++; $display("no closure issued"); end
    checks++; if (sum_tasks_ready == 0) begin failures++; $display("no ready task"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("fib sched: requests %0d steals %0d offloads %0d absorbed %0d mem_served %0d fibdone %0d hold %0d", fib_stat[0], fib_stat[1], fib_stat[2], fib_stat[3], fib_stat[4], n_fib_done, hold_pe0);
    $display("sum sched: requests %0d steals %0d offloads %0d absorbed %0d mem_served %0d sumdone %0d", sum_stat[0], sum_stat[1], sum_stat[2], sum_stat[3], sum_stat[4], n_sum_done);
    $display("spawns held for buffered closure writes: %0d cycles", n_spawn_held);
    $display("closures issued %0d used %0d, notifications %0d/%0d, sum tasks ready %0d", closures_issued, n_closures_used, args_notified, n_notify_sent, sum_tasks_ready);
    $display("watchdog: %0d of %0d roots done", roots_done, NROOT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
