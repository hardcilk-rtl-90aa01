// hardcilk_fib: complete task-management system for the two-task Fibonacci
// program (task fib spawns fib and creates a sum successor; fib and sum send
// arguments to sum).
//
// The system contains, as the program's task relations require:
//   * a fib work-stealing scheduler with one queue per fib PE (fib spawns fib);
//   * a sum work-stealing scheduler with one queue per sum PE plus one
//     spawn-only client per argument notifier server (ready sum tasks enter
//     the scheduler there);
//   * a sum closure allocator with one client per fib PE (fib spawn_next sum);
//   * a sum argument notifier with one client per fib PE and per sum PE
//     (fib and sum send_argument to sum);
//   * a spawn_next write buffer per fib PE, through which the PE posts the
//     initialising writes of a new sum closure (fib_cw_*). While a PE's
//     buffer still holds writes, that PE's spawn port is held (ready low):
//     children spawned after a spawn_next can then never notify the
//     closure before its join counter is in memory. This ordering rule is
//     this design's; it assumes memory applies a write once it accepts it.
// The PEs and the memory are outside: every PE stream and every server's
// memory port is a port of this module. Memory ports are numbered: fib
// scheduler servers, then sum scheduler servers, then closure allocator
// servers, then argument notifier servers, then the fib PEs' write buffers
// (write-only: their response inputs are ignored). The host sets each scheduler
// server's spill region and the closure free list through cfg_* inputs.
//
// Default sizes are the example Fibonacci configuration: 16 fib PEs, 8 sum
// PEs, 4 servers per scheduler, 1 closure allocator server, 4 argument
// notifier servers; task queues hold 32 tasks of 256 bits. The memory port
// protocol and the closure layout are this design's (see hc_pkg).
module hardcilk_fib
  import hc_pkg::*;
#(
  parameter int unsigned FIB_PES           = 16,
  parameter int unsigned SUM_PES           = 8,
  parameter int unsigned FIB_SCHED_SERVERS = 4,
  parameter int unsigned SUM_SCHED_SERVERS = 4,
  parameter int unsigned CLOSURE_SERVERS   = 1,
  parameter int unsigned ARG_SERVERS       = 4,
  parameter int unsigned QUEUE_DEPTH       = 32,
  parameter int unsigned WRITE_BUF_DEPTH   = 4,
  localparam int unsigned MEM_PORTS = FIB_SCHED_SERVERS + SUM_SCHED_SERVERS + CLOSURE_SERVERS + ARG_SERVERS + FIB_PES
) (
  input  logic        clk,
  input  logic        rst_n,
  // fib PEs
  output logic        fib_task_valid  [FIB_PES],
  input  logic        fib_task_ready  [FIB_PES],
  output task_t       fib_task_data   [FIB_PES],
  input  logic        fib_spawn_valid [FIB_PES],
  output logic        fib_spawn_ready [FIB_PES],
  input  task_t       fib_spawn_data  [FIB_PES],
  output logic        fib_closure_valid [FIB_PES],
  input  logic        fib_closure_ready [FIB_PES],
  output addr_t       fib_closure_data  [FIB_PES],
  input  logic        fib_cw_valid [FIB_PES],
  output logic        fib_cw_ready [FIB_PES],
  input  mem_req_t    fib_cw_req   [FIB_PES],
  input  logic        fib_arg_valid [FIB_PES],
  output logic        fib_arg_ready [FIB_PES],
  input  addr_t       fib_arg_data  [FIB_PES],
  // sum PEs
  output logic        sum_task_valid [SUM_PES],
  input  logic        sum_task_ready [SUM_PES],
  output task_t       sum_task_data  [SUM_PES],
  input  logic        sum_arg_valid [SUM_PES],
  output logic        sum_arg_ready [SUM_PES],
  input  addr_t       sum_arg_data  [SUM_PES],
  // host configuration
  input  addr_t       fib_q_base [FIB_SCHED_SERVERS],
  input  logic [31:0] fib_q_size [FIB_SCHED_SERVERS],
  input  addr_t       sum_q_base [SUM_SCHED_SERVERS],
  input  logic [31:0] sum_q_size [SUM_SCHED_SERVERS],
  input  addr_t       closure_list_base [CLOSURE_SERVERS],
  input  logic [31:0] closure_list_len  [CLOSURE_SERVERS],
  // memory
  output logic        mem_req_valid  [MEM_PORTS],
  input  logic        mem_req_ready  [MEM_PORTS],
  output mem_req_t    mem_req        [MEM_PORTS],
  input  logic        mem_resp_valid [MEM_PORTS],
  input  task_t       mem_resp_data  [MEM_PORTS],
  // observation: fib scheduler, sum scheduler, allocator, notifier
  output logic [31:0] fib_stat [5],
  output logic [31:0] sum_stat [5],
  output logic [31:0] closures_issued,
  output logic [31:0] args_notified,
  output logic [31:0] sum_tasks_ready
);
  localparam int unsigned FS = FIB_SCHED_SERVERS;
  localparam int unsigned SS = SUM_SCHED_SERVERS;
  localparam int unsigned CS = CLOSURE_SERVERS;
  localparam int unsigned AS = ARG_SERVERS;
  localparam int unsigned O_SUM = FS;
  localparam int unsigned O_CL  = FS + SS;
  localparam int unsigned O_ARG = FS + SS + CS;
  localparam int unsigned O_WB  = FS + SS + CS + AS;

  // memory port slices
  logic     f_rv [FS]; logic f_rr [FS]; mem_req_t f_rq [FS]; logic f_pv [FS]; task_t f_pd [FS];
  logic     s_rv [SS]; logic s_rr [SS]; mem_req_t s_rq [SS]; logic s_pv [SS]; task_t s_pd [SS];
  logic     c_rv [CS]; logic c_rr [CS]; mem_req_t c_rq [CS]; logic c_pv [CS]; task_t c_pd [CS];
  logic     a_rv [AS]; logic a_rr [AS]; mem_req_t a_rq [AS]; logic a_pv [AS]; task_t a_pd [AS];

  for (genvar i = 0; i < FS; i++) begin : g_mf
    assign mem_req_valid[i] = f_rv[i]; assign mem_req[i] = f_rq[i];
    assign f_rr[i] = mem_req_ready[i]; assign f_pv[i] = mem_resp_valid[i]; assign f_pd[i] = mem_resp_data[i];
  end
  for (genvar i = 0; i < SS; i++) begin : g_ms
    assign mem_req_valid[O_SUM+i] = s_rv[i]; assign mem_req[O_SUM+i] = s_rq[i];
    assign s_rr[i] = mem_req_ready[O_SUM+i]; assign s_pv[i] = mem_resp_valid[O_SUM+i]; assign s_pd[i] = mem_resp_data[O_SUM+i];
  end
  for (genvar i = 0; i < CS; i++) begin : g_mc
    assign mem_req_valid[O_CL+i] = c_rv[i]; assign mem_req[O_CL+i] = c_rq[i];
    assign c_rr[i] = mem_req_ready[O_CL+i]; assign c_pv[i] = mem_resp_valid[O_CL+i]; assign c_pd[i] = mem_resp_data[O_CL+i];
  end
  for (genvar i = 0; i < AS; i++) begin : g_ma
    assign mem_req_valid[O_ARG+i] = a_rv[i]; assign mem_req[O_ARG+i] = a_rq[i];
    assign a_rr[i] = mem_req_ready[O_ARG+i]; assign a_pv[i] = mem_resp_valid[O_ARG+i]; assign a_pd[i] = mem_resp_data[O_ARG+i];
  end

  // spawn_next write buffers of the fib PEs (write-only memory ports)
  logic wb_pending [FIB_PES];
  for (genvar i = 0; i < FIB_PES; i++) begin : g_wb
    spawn_next_write_buffer #(.DEPTH(WRITE_BUF_DEPTH)) u_wb (
      .clk, .rst_n, .pe_valid(fib_cw_valid[i]), .pe_ready(fib_cw_ready[i]), .pe_req(fib_cw_req[i]),
      .mem_req_valid(mem_req_valid[O_WB+i]), .mem_req_ready(mem_req_ready[O_WB+i]), .mem_req(mem_req[O_WB+i]),
      .pending(wb_pending[i]));
  end

  // A fib PE's spawns wait until its buffered closure writes have been
  // accepted by memory, so no child can notify a closure that is not yet
  // initialised.
  logic  fib_spawn_v [FIB_PES]; logic fib_spawn_r [FIB_PES];
  for (genvar i = 0; i < FIB_PES; i++) begin : g_order
    assign fib_spawn_v[i]     = fib_spawn_valid[i] && !wb_pending[i];
    assign fib_spawn_ready[i] = fib_spawn_r[i] && !wb_pending[i];
  end

  // fib scheduler: fib PEs execute and spawn fib
  logic  fib_sp_valid [1]; logic fib_sp_ready [1]; task_t fib_sp_data [1];
  assign fib_sp_valid[0] = 1'b0;
  assign fib_sp_data[0]  = '0;

  scheduler #(.NUM_PE(FIB_PES), .NUM_SPAWN(0), .NUM_SERVERS(FS), .DEPTH(QUEUE_DEPTH)) u_fib_sched (
    .clk, .rst_n,
    .pe_task_valid(fib_task_valid), .pe_task_ready(fib_task_ready), .pe_task_data(fib_task_data),
    .pe_spawn_valid(fib_spawn_v), .pe_spawn_ready(fib_spawn_r), .pe_spawn_data(fib_spawn_data),
    .sp_valid(fib_sp_valid), .sp_ready(fib_sp_ready), .sp_data(fib_sp_data),
    .cfg_base(fib_q_base), .cfg_size(fib_q_size),
    .mem_req_valid(f_rv), .mem_req_ready(f_rr), .mem_req(f_rq), .mem_resp_valid(f_pv), .mem_resp_data(f_pd),
    .tot_requests(fib_stat[0]), .tot_steals(fib_stat[1]), .tot_offloads(fib_stat[2]),
    .tot_absorbed(fib_stat[3]), .tot_mem_served(fib_stat[4]));

  // sum scheduler: sum PEs execute, argument notifier servers deliver ready sum tasks
  logic  ready_valid [AS]; logic ready_ready [AS]; task_t ready_data [AS];
  logic  sum_spawn_valid [SUM_PES]; logic sum_spawn_ready [SUM_PES]; task_t sum_spawn_data [SUM_PES];
  for (genvar i = 0; i < SUM_PES; i++) begin : g_sum_nospawn
    assign sum_spawn_valid[i] = 1'b0;   // sum spawns nothing
    assign sum_spawn_data[i]  = '0;
  end

  scheduler #(.NUM_PE(SUM_PES), .NUM_SPAWN(AS), .NUM_SERVERS(SS), .DEPTH(QUEUE_DEPTH)) u_sum_sched (
    .clk, .rst_n,
    .pe_task_valid(sum_task_valid), .pe_task_ready(sum_task_ready), .pe_task_data(sum_task_data),
    .pe_spawn_valid(sum_spawn_valid), .pe_spawn_ready(sum_spawn_ready), .pe_spawn_data(sum_spawn_data),
    .sp_valid(ready_valid), .sp_ready(ready_ready), .sp_data(ready_data),
    .cfg_base(sum_q_base), .cfg_size(sum_q_size),
    .mem_req_valid(s_rv), .mem_req_ready(s_rr), .mem_req(s_rq), .mem_resp_valid(s_pv), .mem_resp_data(s_pd),
    .tot_requests(sum_stat[0]), .tot_steals(sum_stat[1]), .tot_offloads(sum_stat[2]),
    .tot_absorbed(sum_stat[3]), .tot_mem_served(sum_stat[4]));

  // sum closure allocator: fib PEs spawn_next sum
  closure_allocator #(.NUM_CLIENTS(FIB_PES), .NUM_SERVERS(CS)) u_sum_alloc (
    .clk, .rst_n,
    .pe_valid(fib_closure_valid), .pe_ready(fib_closure_ready), .pe_data(fib_closure_data),
    .cfg_list_base(closure_list_base), .cfg_list_len(closure_list_len),
    .mem_req_valid(c_rv), .mem_req_ready(c_rr), .mem_req(c_rq), .mem_resp_valid(c_pv), .mem_resp_data(c_pd),
    .tot_issued(closures_issued));

  // sum argument notifier: fib and sum PEs send_argument to sum
  localparam int unsigned NARG = FIB_PES + SUM_PES;
  logic  an_valid [NARG]; logic an_ready [NARG]; addr_t an_data [NARG];
  for (genvar i = 0; i < FIB_PES; i++) begin : g_an_fib
    assign an_valid[i] = fib_arg_valid[i]; assign an_data[i] = fib_arg_data[i];
    assign fib_arg_ready[i] = an_ready[i];
  end
  for (genvar i = 0; i < SUM_PES; i++) begin : g_an_sum
    assign an_valid[FIB_PES+i] = sum_arg_valid[i]; assign an_data[FIB_PES+i] = sum_arg_data[i];
    assign sum_arg_ready[i] = an_ready[FIB_PES+i];
  end

  argument_notifier #(.NUM_CLIENTS(NARG), .NUM_SERVERS(AS)) u_sum_args (
    .clk, .rst_n,
    .pe_valid(an_valid), .pe_ready(an_ready), .pe_data(an_data),
    .task_valid(ready_valid), .task_ready(ready_ready), .task_data(ready_data),
    .mem_req_valid(a_rv), .mem_req_ready(a_rr), .mem_req(a_rq), .mem_resp_valid(a_pv), .mem_resp_data(a_pd),
    .tot_notified(args_notified), .tot_ready(sum_tasks_ready));
endmodule
