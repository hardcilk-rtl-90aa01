// tb_arg_client: the argument notifier client accepts closure addresses from
// its PE while its buffer has room and injects them on the ring in order
// when the ring slot is free. Both sides are random; checks order, the
// PE-side ready rule and that nothing is lost.
module tb_arg_client;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pe_valid, pe_ready, inj_valid, inj_ready;
  addr_t pe_data, inj_data;
  addr_t sent [$];
  int got = 0;

  arg_client #(.BUF_DEPTH(2)) dut (.clk, .rst_n, .pe_valid, .pe_ready, .pe_data, .inj_valid, .inj_ready, .inj_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    automatic addr_t nxt = 64'h2028;
    pe_valid = 0; pe_data = '0; inj_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      pe_valid = ($urandom % 2); pe_data = nxt;
      inj_ready = (cyc > 20) && ($urandom % 3 != 0);
      #1;
      check(pe_ready == (sent.size() < 2), "PE ready while buffer has room");
      check(inj_valid == (sent.size() > 0), "inject while buffer holds an address");
      if (inj_valid && inj_ready) begin
        check(inj_data == sent[0], "injected in order");
        void'(sent.pop_front()); got++;
      end
      if (pe_valid && pe_ready) begin sent.push_back(nxt); nxt += 64; end
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
