// scheduler: the work-stealing scheduler of one task type.
//
// For each of the NUM_PE processing elements that execute this task type it
// holds a local task queue (task_deque) and a scheduler client; for each of
// the NUM_SPAWN ports that may only spawn such tasks (PEs of another type, or
// argument notifier servers delivering tasks that became ready) it holds a
// small queue and a spawn-only client; and it holds NUM_SERVERS scheduler
// servers that spill tasks to memory. All clients and servers sit on a
// scheduler network of two rings turning in opposite directions: the
// requests ring carries steal requests, the data ring carries tasks.
// Ring order: execute clients 0..NUM_PE-1, then spawn-only clients, then
// servers.
//
// PE interface (per PE, valid/ready streams of TASK_W-bit tasks): pe_task_*
// delivers the next task to run, pe_spawn_* accepts spawned tasks. Spawn-only
// ports: sp_*. Each server has a memory port (see sched_server) and a
// host-set region (cfg_base, cfg_size in 32-byte slots). Totals of the
// clients' and servers' activity counters are output for observation.
// Servers absorb a data-ring task once it has made NODES - 1 hops; the hop
// counters are widened beyond hc_pkg::AGE_W when the ring needs it.
// The structure follows the document; queue thresholds, the spawn-only
// queue depth and the ring order are this design's choices.
module scheduler
  import hc_pkg::*;
#(
  parameter int unsigned NUM_PE      = 4,
  parameter int unsigned NUM_SPAWN   = 0,
  parameter int unsigned NUM_SERVERS = 1,
  parameter int unsigned DEPTH       = 32,
  parameter int unsigned SPAWN_DEPTH = 4,
  parameter int unsigned TASK_W      = hc_pkg::TASK_W,
  localparam int unsigned NSP        = (NUM_SPAWN == 0) ? 1 : NUM_SPAWN
) (
  input  logic              clk,
  input  logic              rst_n,
  // execute PEs
  output logic              pe_task_valid  [NUM_PE],
  input  logic              pe_task_ready  [NUM_PE],
  output logic [TASK_W-1:0] pe_task_data   [NUM_PE],
  input  logic              pe_spawn_valid [NUM_PE],
  output logic              pe_spawn_ready [NUM_PE],
  input  logic [TASK_W-1:0] pe_spawn_data  [NUM_PE],
  // spawn-only ports
  input  logic              sp_valid [NSP],
  output logic              sp_ready [NSP],
  input  logic [TASK_W-1:0] sp_data  [NSP],
  // servers
  input  addr_t             cfg_base [NUM_SERVERS],
  input  logic [31:0]       cfg_size [NUM_SERVERS],
  output logic              mem_req_valid  [NUM_SERVERS],
  input  logic              mem_req_ready  [NUM_SERVERS],
  output mem_req_t          mem_req        [NUM_SERVERS],
  input  logic              mem_resp_valid [NUM_SERVERS],
  input  logic [TASK_W-1:0] mem_resp_data  [NUM_SERVERS],
  // observation
  output logic [31:0]       tot_requests,
  output logic [31:0]       tot_steals,
  output logic [31:0]       tot_offloads,
  output logic [31:0]       tot_absorbed,
  output logic [31:0]       tot_mem_served
);
  localparam int unsigned NCL   = NUM_PE + NUM_SPAWN;
  localparam int unsigned NODES = NCL + NUM_SERVERS;
  // hop counters must count to NODES - 1 (the absorb age) without saturating
  localparam int unsigned AGE_W = ($clog2(NODES) + 1 > hc_pkg::AGE_W) ? $clog2(NODES) + 1 : hc_pkg::AGE_W;

  // requests ring (payload-free; one dummy bit)
  logic             rq_peek_valid [NODES];
  logic [0:0]       rq_peek_data  [NODES];
  logic [AGE_W-1:0] rq_peek_age   [NODES];
  logic             rq_take       [NODES];
  logic             rq_inj_valid  [NODES];
  logic [0:0]       rq_inj_data   [NODES];
  logic             rq_inj_ready  [NODES];
  // data ring
  logic              dt_peek_valid [NODES];
  logic [TASK_W-1:0] dt_peek_data  [NODES];
  logic [AGE_W-1:0]  dt_peek_age   [NODES];
  logic              dt_take       [NODES];
  logic              dt_inj_valid  [NODES];
  logic [TASK_W-1:0] dt_inj_data   [NODES];
  logic              dt_inj_ready  [NODES];

  logic [31:0] c_req [NCL], c_steal [NCL], c_off [NCL], c_rcv [NCL];
  logic [31:0] s_cnt [NUM_SERVERS], s_abs [NUM_SERVERS], s_srv [NUM_SERVERS];

  ring_network #(.NODES(NODES), .W(1), .AGE_W(AGE_W), .REVERSE(1'b0)) u_req_ring (
    .clk, .rst_n,
    .peek_valid(rq_peek_valid), .peek_data(rq_peek_data), .peek_age(rq_peek_age),
    .take(rq_take), .inj_valid(rq_inj_valid), .inj_data(rq_inj_data), .inj_ready(rq_inj_ready));

  ring_network #(.NODES(NODES), .W(TASK_W), .AGE_W(AGE_W), .REVERSE(1'b1)) u_data_ring (
    .clk, .rst_n,
    .peek_valid(dt_peek_valid), .peek_data(dt_peek_data), .peek_age(dt_peek_age),
    .take(dt_take), .inj_valid(dt_inj_valid), .inj_data(dt_inj_data), .inj_ready(dt_inj_ready));

  for (genvar c = 0; c < NCL; c++) begin : g_client
    localparam bit EXE = (c < NUM_PE);
    localparam int unsigned QD = EXE ? DEPTH : SPAWN_DEPTH;
    logic [$clog2(QD):0] q_count;
    logic              tp_valid, tp_ready, tu_valid, tu_ready;
    logic [TASK_W-1:0] tp_data, tu_data;
    logic              hpush_valid, hpush_ready, hpop_valid, hpop_ready;
    logic [TASK_W-1:0] hpush_data, hpop_data;

    if (EXE) begin : g_exe
      assign hpush_valid       = pe_spawn_valid[c];
      assign hpush_data        = pe_spawn_data[c];
      assign pe_spawn_ready[c] = hpush_ready;
      assign pe_task_valid[c]  = hpop_valid;
      assign pe_task_data[c]   = hpop_data;
      assign hpop_ready        = pe_task_ready[c];
    end else begin : g_sp
      assign hpush_valid = sp_valid[c-NUM_PE];
      assign hpush_data  = sp_data[c-NUM_PE];
      assign sp_ready[c-NUM_PE] = hpush_ready;
      assign hpop_ready  = 1'b0;
    end

    task_deque #(.DEPTH(QD), .TASK_W(TASK_W)) u_q (
      .clk, .rst_n,
      .head_push_valid(hpush_valid), .head_push_ready(hpush_ready), .head_push_data(hpush_data),
      .head_pop_valid(hpop_valid), .head_pop_ready(hpop_ready), .head_pop_data(hpop_data),
      .tail_pop_valid(tp_valid), .tail_pop_ready(tp_ready), .tail_pop_data(tp_data),
      .tail_push_valid(tu_valid), .tail_push_ready(tu_ready), .tail_push_data(tu_data),
      .count(q_count));

    sched_client #(
      .DEPTH(QD), .TASK_W(TASK_W), .REQ_THR(0), .STEAL_THR(EXE ? 2 : 1),
      .OFFLOAD_THR(EXE ? QD - 2 : 1), .CAN_EXECUTE(EXE)
    ) u_c (
      .clk, .rst_n,
      .q_count(q_count), .q_pop_valid(tp_valid), .q_pop_ready(tp_ready), .q_pop_data(tp_data),
      .q_push_valid(tu_valid), .q_push_ready(tu_ready), .q_push_data(tu_data),
      .rq_peek_valid(rq_peek_valid[c]), .rq_take(rq_take[c]),
      .rq_inj_valid(rq_inj_valid[c]), .rq_inj_ready(rq_inj_ready[c]),
      .dt_peek_valid(dt_peek_valid[c]), .dt_peek_data(dt_peek_data[c]), .dt_take(dt_take[c]),
      .dt_inj_valid(dt_inj_valid[c]), .dt_inj_data(dt_inj_data[c]), .dt_inj_ready(dt_inj_ready[c]),
      .n_requests(c_req[c]), .n_steals_served(c_steal[c]), .n_offloads(c_off[c]), .n_received(c_rcv[c]));
    assign rq_inj_data[c] = 1'b1;
  end

  if (NUM_SPAWN == 0) begin : g_no_sp
    assign sp_ready[0] = 1'b0;
  end

  for (genvar s = 0; s < NUM_SERVERS; s++) begin : g_server
    localparam int unsigned N = NCL + s;
    sched_server #(.TASK_W(TASK_W), .AGE_W(AGE_W), .ABSORB_AGE(NODES - 1)) u_s (
      .clk, .rst_n, .cfg_base(cfg_base[s]), .cfg_size(cfg_size[s]),
      .rq_peek_valid(rq_peek_valid[N]), .rq_take(rq_take[N]),
      .dt_peek_valid(dt_peek_valid[N]), .dt_peek_data(dt_peek_data[N]), .dt_peek_age(dt_peek_age[N]),
      .dt_take(dt_take[N]), .dt_inj_valid(dt_inj_valid[N]), .dt_inj_data(dt_inj_data[N]),
      .dt_inj_ready(dt_inj_ready[N]),
      .mem_req_valid(mem_req_valid[s]), .mem_req_ready(mem_req_ready[s]), .mem_req(mem_req[s]),
      .mem_resp_valid(mem_resp_valid[s]), .mem_resp_data(mem_resp_data[s]),
      .mq_count(s_cnt[s]), .n_absorbed(s_abs[s]), .n_served(s_srv[s]));
    assign rq_inj_valid[N] = 1'b0;
    assign rq_inj_data[N]  = 1'b0;
  end

  always_comb begin
    tot_requests = '0; tot_steals = '0; tot_offloads = '0;
    tot_absorbed = '0; tot_mem_served = '0;
    for (int c = 0; c < NCL; c++) begin
      tot_requests += c_req[c];
      tot_steals   += c_steal[c];
      tot_offloads += c_off[c];
    end
    for (int s = 0; s < NUM_SERVERS; s++) begin
      tot_absorbed   += s_abs[s];
      tot_mem_served += s_srv[s];
    end
  end
endmodule
