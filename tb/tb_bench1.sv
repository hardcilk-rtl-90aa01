// tb_bench1: knary Benchmark 1 on a single work-stealing scheduler, at the
// 28-PE size used for the efficiency measurements and at 256 PEs for the
// scalability end of the range. Both systems (tb_knary_sched) have 4
// scheduler servers and run side by side; each runs a tree of 6-way
// branching (depth 5 with 28 PEs, 9331 tasks; depth 6 with 256 PEs, 55987
// tasks) with 8-, 32-, 64- and 256-cycle tasks and checks the tree ran
// exactly once. Here the testbench also checks that efficiency rises with
// task size and, for 256-cycle tasks, is above 90 % on both systems. The 256-PE
// system has a 260-node ring, which also covers hop counters wider than
// 8 bits. Tree shapes are this testbench's choice.
module tb_bench1;
  bit d28, d256;
  int c28, f28, c256, f256;
  int unsigned e28 [4], e256 [4];
  int checks = 0, failures = 0;

  tb_knary_sched #(.NPE(28),  .TREE_DEPTH(5)) u_28  (.done(d28),  .checks(c28),  .failures(f28),  .eff_pm(e28));
  tb_knary_sched #(.NPE(256), .TREE_DEPTH(6)) u_256 (.done(d256), .checks(c256), .failures(f256), .eff_pm(e256));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wait (d28 && d256);
    checks += c28 + c256;
    failures += f28 + f256;
    check(e28[3] > e28[0], "28 PEs: efficiency grows with task size");
    check(e28[3] > 900, "28 PEs: efficiency above 90% with 256-cycle tasks");
    check(e256[3] > e256[0], "256 PEs: efficiency grows with task size");
    check(e256[3] > 900, "256 PEs: efficiency above 90% with 256-cycle tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20_000_000;      // 2,000,000 cycles of 10 time units
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
