// sched_server: scheduler server, which extends the task queues of one
// scheduler into memory.
//
// It watches both rings at its node. A task on the data ring whose hop count
// has reached ABSORB_AGE has passed every node without being claimed, which
// is taken as contention in the network: the server removes it and appends
// it to its memory-based queue. A steal request reaching the server while that
// queue holds tasks is removed, the oldest task is read back from memory and
// injected on the data ring. The memory queue is a circular buffer of
// cfg_size 32-byte slots at byte address cfg_base, both set by the host
// before tasks flow (cfg_size may be raised at run time while the queue is
// empty). One memory operation is in flight at a time.
//
// Memory port: mem_req_valid/mem_req_ready carry a hc_pkg::mem_req_t; read
// data returns on mem_resp_valid/mem_resp_data in order and must be accepted.
// Timing: an absorbed task costs one write; a served request costs one read
// plus the memory latency before the task appears on the ring.
// The two duties follow the document; the age-based contention test, the
// FIFO order of the memory queue and the one-at-a-time operation are this
// design's choices.
module sched_server
  import hc_pkg::*;
#(
  parameter int unsigned TASK_W     = hc_pkg::TASK_W,
  parameter int unsigned AGE_W      = hc_pkg::AGE_W,
  parameter int unsigned ABSORB_AGE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             cfg_base,
  input  logic [31:0]       cfg_size,
  // requests ring node
  input  logic              rq_peek_valid,
  output logic              rq_take,
  // data ring node
  input  logic              dt_peek_valid,
  input  logic [TASK_W-1:0] dt_peek_data,
  input  logic [AGE_W-1:0]  dt_peek_age,
  output logic              dt_take,
  output logic              dt_inj_valid,
  output logic [TASK_W-1:0] dt_inj_data,
  input  logic              dt_inj_ready,
  // memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_resp_valid,
  input  logic [TASK_W-1:0] mem_resp_data,
  // state
  output logic [31:0]       mq_count,
  output logic [31:0]       n_absorbed,
  output logic [31:0]       n_served
);
  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_READ, S_WAIT, S_INJECT} state_e;
  state_e            state;
  logic [TASK_W-1:0] buffer;
  logic [31:0]       rd_idx, wr_idx;
  logic              absorb, serve;

  assign absorb  = (state == S_IDLE) && dt_peek_valid && (dt_peek_age >= AGE_W'(ABSORB_AGE))
                   && (mq_count < cfg_size);
  assign serve   = (state == S_IDLE) && !absorb && rq_peek_valid && (mq_count != 0);
  assign dt_take = absorb;
  assign rq_take = serve;

  assign dt_inj_valid = (state == S_INJECT);
  assign dt_inj_data  = buffer;

  always_comb begin
    mem_req_valid = (state == S_WRITE) || (state == S_READ);
    mem_req.we    = (state == S_WRITE);
    mem_req.addr  = cfg_base + addr_t'((state == S_WRITE) ? wr_idx : rd_idx) * addr_t'(WORD_BYTES);
    mem_req.wdata = buffer;
    mem_req.wstrb = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      buffer     <= '0;
      rd_idx     <= '0;
      wr_idx     <= '0;
      mq_count   <= '0;
      n_absorbed <= '0;
      n_served   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (absorb) begin
            buffer <= dt_peek_data;
            state  <= S_WRITE;
          end else if (serve) begin
            state  <= S_READ;
          end
        end
        S_WRITE: if (mem_req_ready) begin
          wr_idx     <= (wr_idx + 1 >= cfg_size) ? '0 : wr_idx + 1;
          mq_count   <= mq_count + 1;
          n_absorbed <= n_absorbed + 1;
          state      <= S_IDLE;
        end
        S_READ: if (mem_req_ready) begin
          rd_idx   <= (rd_idx + 1 >= cfg_size) ? '0 : rd_idx + 1;
          mq_count <= mq_count - 1;
          state    <= S_WAIT;
        end
        S_WAIT: if (mem_resp_valid) begin
          buffer <= mem_resp_data;
          state  <= S_INJECT;
        end
        S_INJECT: if (dt_inj_ready) begin
          n_served <= n_served + 1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_overfill: assert property (@(posedge clk) disable iff (!rst_n) mq_count <= cfg_size);
endmodule
