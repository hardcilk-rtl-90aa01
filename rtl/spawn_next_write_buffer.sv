// spawn_next_write_buffer: posted-write buffer for the second half of
// spawn_next.
//
// When a PE executes spawn_next it must write the successor's join counter
// and the arguments it already has into the empty closure it was given. The
// PE hands these writes (address, data, byte strobe) to this buffer on a
// valid/ready stream and continues at once; the buffer holds up to DEPTH of
// them and issues them, in order, on its memory port. The PE waits only when
// the buffer is full. pending is high while writes are still buffered.
// Timing: a write accepted in cycle t can be offered to memory in cycle t+1.
// Purpose and place follow the document; depth and interface are this
// design's. Every request is issued as a write whatever its we bit says.
// Ordering note: the buffer itself does not order its writes against other
// memory ports. The enclosing system uses pending for that: it holds the
// PE's spawns while pending is high, so a child can never notify a closure
// whose initialising writes are still buffered.
module spawn_next_write_buffer
  import hc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     pe_valid,
  output logic     pe_ready,
  input  mem_req_t pe_req,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  output logic     pending
);
  localparam int unsigned RW = $bits(mem_req_t);
  logic [RW-1:0] out_bits;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.W(RW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(pe_valid), .in_ready(pe_ready), .in_data({pe_req.we | 1'b1, pe_req.addr, pe_req.wdata, pe_req.wstrb}),
    .out_valid(mem_req_valid), .out_ready(mem_req_ready), .out_data(out_bits), .count(count));

  assign mem_req = mem_req_t'(out_bits);
  assign pending = (count != '0);
endmodule
