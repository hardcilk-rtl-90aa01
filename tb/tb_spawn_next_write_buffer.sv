// tb_spawn_next_write_buffer: the PE posts closure writes at random; the
// memory side accepts at random. Checks: writes leave in order with address,
// data and strobe intact and as writes; the PE is held only when DEPTH writes
// are buffered; a write accepted into an empty buffer is offered to memory
// in the next cycle; pending tracks the buffer.
module tb_spawn_next_write_buffer;
  import hc_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pe_valid, pe_ready, mem_req_valid, mem_req_ready, pending;
  mem_req_t pe_req, mem_req;
  mem_req_t q [$];
  int sent = 0, got = 0;

  spawn_next_write_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .pe_valid, .pe_ready, .pe_req,
    .mem_req_valid, .mem_req_ready, .mem_req, .pending);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    pe_valid = 0; pe_req = '0; mem_req_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: one write into the empty buffer
    @(negedge clk); pe_valid = 1; pe_req.we = 1; pe_req.addr = 64'h40; pe_req.wdata = 256'h2; pe_req.wstrb = 32'hF;
    #1 check(pe_ready && !mem_req_valid, "empty buffer accepts");
    @(negedge clk); pe_valid = 0; #1;
    check(mem_req_valid && mem_req.addr == 64'h40 && mem_req.wstrb == 32'hF && mem_req.we, "offered next cycle");
    check(pending, "pending while buffered");
    mem_req_ready = 1;
    @(negedge clk); mem_req_ready = 0; #1;
    check(!pending && !mem_req_valid, "drained");
    for (int cyc = 0; cyc < 800; cyc++) begin
      @(negedge clk);
      pe_valid = $urandom % 2;
      pe_req.we = $urandom % 2;   // the buffer issues writes whatever this says
      pe_req.addr = 64'(cyc) * 32; pe_req.wdata = {8{$urandom}}; pe_req.wstrb = $urandom;
      mem_req_ready = (cyc % 200) < 150 ? ($urandom % 2) : 0;
      #1;
      check(pe_ready == (q.size() < DEPTH), "PE held only when full");
      check(pending == (q.size() > 0), "pending flag");
      if (mem_req_valid && mem_req_ready) begin
        check(q.size() > 0 && mem_req.addr == q[0].addr && mem_req.wdata == q[0].wdata
              && mem_req.wstrb == q[0].wstrb && mem_req.we, "write issued in order and intact");
        void'(q.pop_front()); got++;
      end
      if (pe_valid && pe_ready) begin q.push_back(pe_req); sent++; end
    end
    check(got > 100, "writes flowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
