// tb_mem_model: behavioural model of the memory behind the servers' memory
// ports, for testbenches only.
//
// WORDS words of 256 bits, addressed by byte address / 32. Each of PORTS
// ports accepts a request in a cycle where mem_req_ready is high (ready is
// random with probability 3/4 when STALLS is set, else always high). Writes
// are applied at acceptance with their byte strobes; a read samples the array
// at acceptance and its data is returned LATENCY cycles later, in order.
// Testbenches may read and write the array `mem` directly.
module tb_mem_model
  import hc_pkg::*;
#(
  parameter int unsigned PORTS   = 1,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 10,
  parameter bit          STALLS  = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     mem_req_valid  [PORTS],
  output logic     mem_req_ready  [PORTS],
  input  mem_req_t mem_req        [PORTS],
  output logic     mem_resp_valid [PORTS],
  output task_t    mem_resp_data  [PORTS]
);
  task_t mem [WORDS];
  typedef struct { longint unsigned due; task_t data; } resp_t;
  resp_t pending [PORTS][$];
  longint unsigned cycle = 0;
  int unsigned n_reads = 0, n_writes = 0;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    for (int p = 0; p < PORTS; p++) begin
      mem_req_ready[p]  = 1'b0;
      mem_resp_valid[p] = 1'b0;
      mem_resp_data[p]  = '0;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int p = 0; p < PORTS; p++) begin
      // response leaving this cycle was consumed at this edge
      if (mem_resp_valid[p]) void'(pending[p].pop_front());
      if (rst_n && mem_req_valid[p] && mem_req_ready[p]) begin
        automatic int unsigned w = int'(mem_req[p].addr / 32);
        if (w >= WORDS) $fatal(1, "tb_mem_model: address %0h out of range", mem_req[p].addr);
        if (mem_req[p].we) begin
          for (int b = 0; b < 32; b++)
            if (mem_req[p].wstrb[b]) mem[w][b*8 +: 8] = mem_req[p].wdata[b*8 +: 8];
          n_writes++;
        end else begin
          automatic resp_t r;
          r.due  = cycle + LATENCY;
          r.data = mem[w];
          pending[p].push_back(r);
          n_reads++;
        end
      end
      mem_req_ready[p] <= STALLS ? (($urandom % 4) != 0) : 1'b1;
      if (pending[p].size() > 0 && pending[p][0].due <= cycle + 1) begin
        mem_resp_valid[p] <= 1'b1;
        mem_resp_data[p]  <= pending[p][0].data;
      end else begin
        mem_resp_valid[p] <= 1'b0;
      end
    end
  end
endmodule
