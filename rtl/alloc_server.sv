// alloc_server: closure allocator server.
//
// The host prepares in memory a list of addresses of empty closures of one
// type (64-bit entries, four per 32-byte word, starting at cfg_list_base) and
// tells the server how many entries are valid (cfg_list_len, which may grow
// at run time). The server fetches the list a word at a time, i.e. four
// pre-allocated closures per memory read, and injects the addresses one by
// one on the closure allocator ring, from which clients collect them.
//
// Memory port as in sched_server (reads only). Timing: one read and its
// latency per four addresses, then one address per cycle while the ring slot
// is free. n_issued counts the addresses injected so far.
// Bulk pre-allocation from memory follows the document; the list format and
// the fetch-one-word-at-a-time scheme are this design's choices.
module alloc_server
  import hc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       cfg_list_base,
  input  logic [31:0] cfg_list_len,
  // ring node
  output logic        inj_valid,
  output addr_t       inj_data,
  input  logic        inj_ready,
  // memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  input  logic        mem_resp_valid,
  input  logic [hc_pkg::TASK_W-1:0] mem_resp_data,
  output logic [31:0] n_issued
);
  localparam int unsigned PER_WORD = hc_pkg::TASK_W / hc_pkg::ADDR_W; // 4

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_INJECT} state_e;
  state_e                    state;
  logic [hc_pkg::TASK_W-1:0] word;
  logic [1:0]                sel;

  assign sel       = n_issued[1:0];
  assign inj_valid = (state == S_INJECT);
  assign inj_data  = word[sel*hc_pkg::ADDR_W +: hc_pkg::ADDR_W];

  always_comb begin
    mem_req_valid = (state == S_READ);
    mem_req.we    = 1'b0;
    mem_req.addr  = cfg_list_base + addr_t'(n_issued / 32'(PER_WORD)) * addr_t'(hc_pkg::WORD_BYTES);
    mem_req.wdata = '0;
    mem_req.wstrb = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      word     <= '0;
      n_issued <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (n_issued < cfg_list_len) state <= S_READ;
        S_READ:   if (mem_req_ready) state <= S_WAIT;
        S_WAIT:   if (mem_resp_valid) begin
          word  <= mem_resp_data;
          state <= S_INJECT;
        end
        S_INJECT: if (inj_ready) begin
          n_issued <= n_issued + 1;
          // last entry of this word, or of the list
          if (sel == 2'(PER_WORD - 1) || n_issued + 1 >= cfg_list_len) state <= S_IDLE;
        end
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
