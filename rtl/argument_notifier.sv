// argument_notifier: argument notifier for one closure (successor task) type.
//
// NUM_CLIENTS arg_clients (one per PE that may send an argument to this
// closure type) and NUM_SERVERS arg_servers share one ring. Clients inject
// the addresses of arguments their PEs have written; each server takes the
// addresses of its own shard, decrements the closure's join counter in
// memory and, when it reaches zero, delivers the now-ready task on its
// ready-task stream to the scheduler of that task type.
// Ring order: clients first, then servers.
//
// Ports: per client a valid/ready address stream from the PE; per server a
// ready-task stream and a memory port.
// The structure follows the document; sizes and ring order are this
// design's choices.
module argument_notifier
  import hc_pkg::*;
#(
  parameter int unsigned NUM_CLIENTS = 4,
  parameter int unsigned NUM_SERVERS = 4,
  parameter int unsigned BUF_DEPTH   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pe_valid [NUM_CLIENTS],
  output logic        pe_ready [NUM_CLIENTS],
  input  addr_t       pe_data  [NUM_CLIENTS],
  output logic        task_valid [NUM_SERVERS],
  input  logic        task_ready [NUM_SERVERS],
  output task_t       task_data  [NUM_SERVERS],
  output logic        mem_req_valid  [NUM_SERVERS],
  input  logic        mem_req_ready  [NUM_SERVERS],
  output mem_req_t    mem_req        [NUM_SERVERS],
  input  logic        mem_resp_valid [NUM_SERVERS],
  input  task_t       mem_resp_data  [NUM_SERVERS],
  output logic [31:0] tot_notified,
  output logic [31:0] tot_ready
);
  localparam int unsigned NODES = NUM_CLIENTS + NUM_SERVERS;

  logic                      peek_valid [NODES];
  addr_t                     peek_data  [NODES];
  logic [hc_pkg::AGE_W-1:0]  peek_age   [NODES];
  logic                      take       [NODES];
  logic                      inj_valid  [NODES];
  addr_t                     inj_data   [NODES];
  logic                      inj_ready  [NODES];
  logic [31:0]               notified   [NUM_SERVERS];
  logic [31:0]               readied    [NUM_SERVERS];

  ring_network #(.NODES(NODES), .W(hc_pkg::ADDR_W), .AGE_W(hc_pkg::AGE_W)) u_ring (
    .clk, .rst_n, .peek_valid, .peek_data, .peek_age, .take, .inj_valid, .inj_data, .inj_ready);

  for (genvar c = 0; c < NUM_CLIENTS; c++) begin : g_client
    arg_client #(.BUF_DEPTH(BUF_DEPTH)) u_c (
      .clk, .rst_n, .pe_valid(pe_valid[c]), .pe_ready(pe_ready[c]), .pe_data(pe_data[c]),
      .inj_valid(inj_valid[c]), .inj_data(inj_data[c]), .inj_ready(inj_ready[c]));
    assign take[c] = 1'b0;
  end

  for (genvar s = 0; s < NUM_SERVERS; s++) begin : g_server
    localparam int unsigned N = NUM_CLIENTS + s;
    arg_server #(.NUM_SHARDS(NUM_SERVERS), .SHARD(s)) u_s (
      .clk, .rst_n, .peek_valid(peek_valid[N]), .peek_data(peek_data[N]), .take(take[N]),
      .task_valid(task_valid[s]), .task_ready(task_ready[s]), .task_data(task_data[s]),
      .mem_req_valid(mem_req_valid[s]), .mem_req_ready(mem_req_ready[s]), .mem_req(mem_req[s]),
      .mem_resp_valid(mem_resp_valid[s]), .mem_resp_data(mem_resp_data[s]),
      .n_notified(notified[s]), .n_ready(readied[s]));
    assign inj_valid[N] = 1'b0;
    assign inj_data[N]  = '0;
  end

  always_comb begin
    tot_notified = '0;
    tot_ready    = '0;
    for (int s = 0; s < NUM_SERVERS; s++) begin
      tot_notified += notified[s];
      tot_ready    += readied[s];
    end
  end
endmodule
