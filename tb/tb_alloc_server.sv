// tb_alloc_server: the closure allocator server reads a free list from the
// memory model (four addresses per word) and injects the addresses in list
// order, stopping at cfg_list_len; raising cfg_list_len at run time releases
// more. The ring slot is free at random. Also checks that addresses come in
// bulk: one memory read per four addresses.
module tb_alloc_server;
  import hc_pkg::*;
  localparam addr_t LIST = 64'h200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic inj_valid, inj_ready;
  addr_t inj_data;
  logic mv [1], mr [1], rv [1]; mem_req_t mq [1]; task_t rd [1];
  logic [31:0] len, n_issued;

  alloc_server dut (
    .clk, .rst_n, .cfg_list_base(LIST), .cfg_list_len(len), .inj_valid, .inj_data, .inj_ready,
    .mem_req_valid(mv[0]), .mem_req_ready(mr[0]), .mem_req(mq[0]), .mem_resp_valid(rv[0]), .mem_resp_data(rd[0]),
    .n_issued);
  tb_mem_model #(.PORTS(1), .WORDS(256), .LATENCY(5)) u_mem (
    .clk, .rst_n, .mem_req_valid(mv), .mem_req_ready(mr), .mem_req(mq), .mem_resp_valid(rv), .mem_resp_data(rd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic addr_t entry(int i); return 64'h10_0000 + addr_t'(i) * 64 + 7; endfunction

  int got = 0;
  always @(posedge clk) if (rst_n && inj_valid && inj_ready) begin
    checks++;
    if (inj_data != entry(got)) begin failures++; $display("FAIL entry %0d = %h", got, inj_data); end
    got++;
  end

  initial begin
    inj_ready = 0; len = 0;
    #1;
    for (int i = 0; i < 20; i++) u_mem.mem[int'(LIST / 32) + i / 4][(i % 4) * 64 +: 64] = entry(i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(got == 0, "nothing issued with an empty list");
    len = 10;
    for (int cyc = 0; cyc < 300; cyc++) begin @(negedge clk); inj_ready = ($urandom % 3) != 0; end
    check(got == 10 && n_issued == 10, "stops at list length");
    check(u_mem.n_reads == 3, "three bulk reads for ten addresses");
    len = 17;
    for (int cyc = 0; cyc < 300; cyc++) begin @(negedge clk); inj_ready = ($urandom % 3) != 0; end
    check(got == 17, "list grown at run time");
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
