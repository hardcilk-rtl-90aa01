// tb_alloc_client: the closure allocator client takes ring addresses only
// while its buffer has room and hands them to the PE in arrival order. The
// ring node is driven with a sequence of addresses; the PE side accepts at
// random. Checks the take rule, order, and that nothing is lost.
module tb_alloc_client;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic peek_valid, take, pe_valid, pe_ready;
  addr_t peek_data, pe_data;
  addr_t sent [$];
  int held = 0;

  alloc_client #(.BUF_DEPTH(2)) dut (.clk, .rst_n, .peek_valid, .peek_data, .take, .pe_valid, .pe_ready, .pe_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    automatic addr_t nxt = 64'h1000;
    automatic int got = 0;
    peek_valid = 0; peek_data = '0; pe_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // PE not ready: buffer of 2 fills, then no more takes
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); peek_valid = 1; peek_data = nxt; #1;
      check(take == (held < 2), "take only while buffer has room");
      if (take) begin sent.push_back(nxt); held++; nxt += 64; end
    end
    // random consumption
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      peek_valid = ($urandom % 2); peek_data = nxt;
      pe_ready = ($urandom % 2);
      #1;
      check(take == (peek_valid && held < 2), "takes exactly when valid and room");
      if (pe_valid && pe_ready) begin
        check(sent.size() > 0 && pe_data == sent[0], "addresses delivered in order");
        void'(sent.pop_front()); held--; got++;
      end
      if (take) begin sent.push_back(nxt); held++; nxt += 64; end
    end
    check(got > 100, "addresses flowed");
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
