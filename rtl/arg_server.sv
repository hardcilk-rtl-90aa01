// arg_server: argument notifier server for one shard of closure addresses.
//
// Closure addresses travel on the argument notifier ring. Server SHARD of
// NUM_SHARDS takes an address when it is idle and the closure index
// (address / CLOSURE_BYTES) modulo NUM_SHARDS equals SHARD, so every closure
// is handled by exactly one server and its join counter is updated by one
// read-modify-write at a time, which makes the update atomic without locks.
// For each address the server reads the closure header, decrements the join
// counter (bits [31:0] of the header word) and writes it back. When the
// counter reaches zero the successor task is complete: the server reads the
// task word (second word of the closure) and offers it on the ready-task
// stream, which feeds a spawn-only client of that task type's scheduler.
//
// Memory port as in sched_server. Timing per notification: a read, its
// latency and a write; plus, for a closure that became ready, a second read
// and its latency. n_notified and n_ready count the two outcomes.
// The sharding, the decrement-and-check and the hand-over to the scheduler
// follow the document; the closure layout (see hc_pkg) is this design's.
module arg_server
  import hc_pkg::*;
#(
  parameter int unsigned NUM_SHARDS = 4,
  parameter int unsigned SHARD      = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // ring node
  input  logic        peek_valid,
  input  addr_t       peek_data,
  output logic        take,
  // ready tasks to the scheduler
  output logic        task_valid,
  input  logic        task_ready,
  output task_t       task_data,
  // memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  input  logic        mem_resp_valid,
  input  task_t       mem_resp_data,
  output logic [31:0] n_notified,
  output logic [31:0] n_ready
);
  typedef enum logic [2:0] {S_IDLE, S_RD_HDR, S_WAIT_HDR, S_WR_HDR, S_RD_TASK, S_WAIT_TASK, S_OUT} state_e;
  state_e                    state;
  addr_t                     base;
  logic [hc_pkg::JOIN_W-1:0] join_cnt;
  task_t                     task_buf;
  addr_t                     cl_index;

  assign cl_index = peek_data / addr_t'(hc_pkg::CLOSURE_BYTES);
  assign take     = (state == S_IDLE) && peek_valid
                    && ((cl_index % addr_t'(NUM_SHARDS)) == addr_t'(SHARD));

  assign task_valid = (state == S_OUT);
  assign task_data  = task_buf;

  always_comb begin
    mem_req_valid = (state == S_RD_HDR) || (state == S_WR_HDR) || (state == S_RD_TASK);
    mem_req.we    = (state == S_WR_HDR);
    mem_req.addr  = (state == S_RD_TASK) ? base + addr_t'(hc_pkg::WORD_BYTES) : base;
    mem_req.wdata = task_t'(join_cnt);
    mem_req.wstrb = hc_pkg::WORD_BYTES'(4'hf);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      base       <= '0;
      join_cnt   <= '0;
      task_buf   <= '0;
      n_notified <= '0;
      n_ready    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          base  <= peek_data & ~(addr_t'(hc_pkg::CLOSURE_BYTES) - 1'b1);
          state <= S_RD_HDR;
        end
        S_RD_HDR:   if (mem_req_ready) state <= S_WAIT_HDR;
        S_WAIT_HDR: if (mem_resp_valid) begin
          join_cnt <= mem_resp_data[hc_pkg::JOIN_W-1:0] - 1'b1;
          state    <= S_WR_HDR;
        end
        S_WR_HDR: if (mem_req_ready) begin
          n_notified <= n_notified + 1;
          state      <= (join_cnt == '0) ? S_RD_TASK : S_IDLE;
        end
        S_RD_TASK:   if (mem_req_ready) state <= S_WAIT_TASK;
        S_WAIT_TASK: if (mem_resp_valid) begin
          task_buf <= mem_resp_data;
          state    <= S_OUT;
        end
        S_OUT: if (task_ready) begin
          n_ready <= n_ready + 1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
