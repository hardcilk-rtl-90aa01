// alloc_client: closure allocator client serving one PE.
//
// It takes addresses of empty closures from the closure allocator ring
// whenever its private buffer has room and offers them to the PE on a
// valid/ready stream, so that the PE, when it executes spawn_next, normally
// finds a closure address waiting. The buffer holds BUF_DEPTH addresses; an
// address taken from the ring is offered to the PE one cycle later.
// The client-with-buffer structure follows the document; the buffer depth
// is this design's choice.
module alloc_client
  import hc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // ring node
  input  logic  peek_valid,
  input  addr_t peek_data,
  output logic  take,
  // PE stream
  output logic  pe_valid,
  input  logic  pe_ready,
  output addr_t pe_data
);
  logic in_ready;
  logic [$clog2(BUF_DEPTH):0] count;

  assign take = peek_valid && in_ready;

  sync_fifo #(.W(hc_pkg::ADDR_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid(peek_valid), .in_ready(in_ready), .in_data(peek_data),
    .out_valid(pe_valid), .out_ready(pe_ready), .out_data(pe_data), .count(count));
endmodule
