// arg_client: argument notifier client serving one PE.
//
// After a PE has written an argument into a waiting closure it sends the
// address it wrote (the continuation) on a valid/ready stream. The client
// buffers up to BUF_DEPTH such addresses and injects them, oldest first, on
// the argument notifier ring whenever its ring slot is free. The PE never
// waits unless the buffer is full. An address accepted from the PE can be
// injected in the following cycle.
// The structure follows the document; the buffer depth is this design's
// choice.
module arg_client
  import hc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // PE stream
  input  logic  pe_valid,
  output logic  pe_ready,
  input  addr_t pe_data,
  // ring node
  output logic  inj_valid,
  output addr_t inj_data,
  input  logic  inj_ready
);
  logic [$clog2(BUF_DEPTH):0] count;

  sync_fifo #(.W(hc_pkg::ADDR_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid(pe_valid), .in_ready(pe_ready), .in_data(pe_data),
    .out_valid(inj_valid), .out_ready(inj_ready), .out_data(inj_data), .count(count));
endmodule
