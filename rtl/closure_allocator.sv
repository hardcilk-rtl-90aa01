// closure_allocator: closure allocator for one closure (successor task) type.
//
// NUM_SERVERS alloc_servers and NUM_CLIENTS alloc_clients share one ring:
// servers inject addresses of empty closures fetched in bulk from memory,
// clients take them into private buffers that feed their PEs. A PE that
// executes spawn_next pops one address from its stream, writes the join
// counter and the arguments it already has into that closure in memory, and
// passes the address on as the continuation of the children it spawns.
// Ring order: clients first, then servers.
//
// Ports: per client a valid/ready address stream to the PE; per server the
// host-set free list (cfg_list_base, cfg_list_len) and a memory port.
// The structure follows the document; sizes and ring order are this
// design's choices.
module closure_allocator
  import hc_pkg::*;
#(
  parameter int unsigned NUM_CLIENTS = 4,
  parameter int unsigned NUM_SERVERS = 1,
  parameter int unsigned BUF_DEPTH   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        pe_valid [NUM_CLIENTS],
  input  logic        pe_ready [NUM_CLIENTS],
  output addr_t       pe_data  [NUM_CLIENTS],
  input  addr_t       cfg_list_base [NUM_SERVERS],
  input  logic [31:0] cfg_list_len  [NUM_SERVERS],
  output logic        mem_req_valid  [NUM_SERVERS],
  input  logic        mem_req_ready  [NUM_SERVERS],
  output mem_req_t    mem_req        [NUM_SERVERS],
  input  logic        mem_resp_valid [NUM_SERVERS],
  input  task_t       mem_resp_data  [NUM_SERVERS],
  output logic [31:0] tot_issued
);
  localparam int unsigned NODES = NUM_CLIENTS + NUM_SERVERS;

  logic                      peek_valid [NODES];
  addr_t                     peek_data  [NODES];
  logic [hc_pkg::AGE_W-1:0]  peek_age   [NODES];
  logic                      take       [NODES];
  logic                      inj_valid  [NODES];
  addr_t                     inj_data   [NODES];
  logic                      inj_ready  [NODES];
  logic [31:0]               issued     [NUM_SERVERS];

  ring_network #(.NODES(NODES), .W(hc_pkg::ADDR_W), .AGE_W(hc_pkg::AGE_W)) u_ring (
    .clk, .rst_n, .peek_valid, .peek_data, .peek_age, .take, .inj_valid, .inj_data, .inj_ready);

  for (genvar c = 0; c < NUM_CLIENTS; c++) begin : g_client
    alloc_client #(.BUF_DEPTH(BUF_DEPTH)) u_c (
      .clk, .rst_n, .peek_valid(peek_valid[c]), .peek_data(peek_data[c]), .take(take[c]),
      .pe_valid(pe_valid[c]), .pe_ready(pe_ready[c]), .pe_data(pe_data[c]));
    assign inj_valid[c] = 1'b0;
    assign inj_data[c]  = '0;
  end

  for (genvar s = 0; s < NUM_SERVERS; s++) begin : g_server
    localparam int unsigned N = NUM_CLIENTS + s;
    alloc_server u_s (
      .clk, .rst_n, .cfg_list_base(cfg_list_base[s]), .cfg_list_len(cfg_list_len[s]),
      .inj_valid(inj_valid[N]), .inj_data(inj_data[N]), .inj_ready(inj_ready[N]),
      .mem_req_valid(mem_req_valid[s]), .mem_req_ready(mem_req_ready[s]), .mem_req(mem_req[s]),
      .mem_resp_valid(mem_resp_valid[s]), .mem_resp_data(mem_resp_data[s]), .n_issued(issued[s]));
    assign take[N] = 1'b0;
  end

  always_comb begin
    tot_issued = '0;
    for (int s = 0; s < NUM_SERVERS; s++) tot_issued += issued[s];
  end
endmodule
