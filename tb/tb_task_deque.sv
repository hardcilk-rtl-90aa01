// tb_task_deque: random test of the double-ended task queue against a
// reference queue. Every cycle each of the four ports is driven at random;
// the testbench works out which transfers happen, checks the popped words
// (head pop = newest, tail pop = oldest), the occupancy and the ready/valid
// rules, and applies the same operations to its reference. A small DEPTH is
// used so that full and empty are reached often.
module tb_task_deque;
  localparam int unsigned DEPTH = 8, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hpu_v, hpu_r, hpo_v, hpo_r, tpo_v, tpo_r, tpu_v, tpu_r;
  logic [W-1:0] hpu_d, hpo_d, tpo_d, tpu_d;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int unsigned seq = 1, n_full = 0, n_both_ends = 0;

  task_deque #(.DEPTH(DEPTH), .TASK_W(W)) dut (
    .clk, .rst_n,
    .head_push_valid(hpu_v), .head_push_ready(hpu_r), .head_push_data(hpu_d),
    .head_pop_valid(hpo_v), .head_pop_ready(hpo_r), .head_pop_data(hpo_d),
    .tail_pop_valid(tpo_v), .tail_pop_ready(tpo_r), .tail_pop_data(tpo_d),
    .tail_push_valid(tpu_v), .tail_push_ready(tpu_r), .tail_push_data(tpu_d),
    .count);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    {hpu_v, hpo_r, tpo_r, tpu_v} = '0;
    hpu_d = '0; tpu_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // bias pushes or pops in phases so that full and empty both occur
      hpu_v = ($urandom % 100) < ((cyc / 500) % 2 ? 30 : 70);
      hpo_r = ($urandom % 100) < ((cyc / 500) % 2 ? 60 : 25);
      tpo_r = ($urandom % 100) < 30;
      tpu_v = !tpo_r && (($urandom % 100) < 30);
      hpu_d = seq; tpu_d = seq + 1; seq += 2;
      #1;
      check(count == model.size(), "count");
      check(hpu_r == (model.size() < DEPTH), "head push ready");
      check(hpo_v == (model.size() > 0), "head pop valid");
      if (hpo_v) check(hpo_d == model[$], "head pop data is newest");
      if (tpo_v) check(tpo_d == model[0], "tail pop data is oldest");
      if (model.size() == DEPTH) n_full++;
      begin
        automatic bit hpush = hpu_v && hpu_r, hpop = hpo_v && hpo_r;
        automatic bit tpop = tpo_v && tpo_r, tpush = tpu_v && tpu_r;
        automatic int after = model.size() + hpush - hpop;
        check(tpo_v == (model.size() > 0 && !(hpop && model.size() == 1)), "tail pop valid rule");
        check(tpu_r == (after < DEPTH), "tail push ready rule");
        if ((hpush || hpop) && (tpush || tpop)) n_both_ends++;
        if (hpop) void'(model.pop_back());
        if (hpush) model.push_back(hpu_d);
        if (tpop) void'(model.pop_front());
        if (tpush) model.push_front(tpu_d);
      end
    end
    check(n_full > 0, "queue reached full");
    check(n_both_ends > 0, "both ends active in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
