// tb_closure_allocator: three clients and one server on the closure ring.
// The host list holds 60 closure addresses; three PEs pop addresses at
// random rates. Checks: every list address reaches exactly one PE, no other
// address appears, and every PE receives some.
module tb_closure_allocator;
  import hc_pkg::*;
  localparam int unsigned NC = 3, NL = 60;
  localparam addr_t LIST = 64'h400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pv [NC], pr [NC]; addr_t pd [NC];
  addr_t lb [1]; logic [31:0] ll [1];
  logic mv [1], mr [1], rv [1]; mem_req_t mq [1]; task_t rd [1];
  logic [31:0] issued;

  closure_allocator #(.NUM_CLIENTS(NC), .NUM_SERVERS(1)) dut (
    .clk, .rst_n, .pe_valid(pv), .pe_ready(pr), .pe_data(pd), .cfg_list_base(lb), .cfg_list_len(ll),
    .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd),
    .tot_issued(issued));
  tb_mem_model #(.PORTS(1), .WORDS(256), .LATENCY(5)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int seen [addr_t];
  int per_pe [NC];
  always @(posedge clk) if (rst_n) for (int c = 0; c < NC; c++) if (pv[c] && pr[c]) begin
    seen[pd[c]] = seen.exists(pd[c]) ? seen[pd[c]] + 1 : 1;
    per_pe[c]++;
  end

  initial begin
    for (int c = 0; c < NC; c++) begin pr[c] = 0; per_pe[c] = 0; end
    lb[0] = LIST; ll[0] = NL;
    #1;
    for (int i = 0; i < NL; i++) u_mem.mem[int'(LIST / 32) + i / 4][(i % 4) * 64 +: 64] = 64'h8000 + i * 64;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) pr[c] = ($urandom % 8) < (c + 1);
    end
    for (int i = 0; i < NL; i++) begin
      automatic addr_t a = 64'h8000 + i * 64;
      check(seen.exists(a) && seen[a] == 1, "each closure address handed out once");
    end
    check(seen.size() == NL, "no stray address");
    for (int c = 0; c < NC; c++) check(per_pe[c] > 0, "each PE served");
    check(issued == NL, "server issued the whole list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
