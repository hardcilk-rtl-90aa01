// tb_ring_network: two rings of 5 nodes, one turning each way. Nodes inject
// tagged flits and take passing flits at random. Checks: every injected flit
// is taken exactly once with its data intact, its hop counter is consistent
// with the distance travelled in the ring's direction, a flit moves one node
// per cycle (seen at the next node the cycle after injection), and inj_ready
// follows the slot rule.
module tb_ring_network;
  localparam int unsigned N = 5, W = 32, AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          pv [2][N]; logic [W-1:0] pd [2][N]; logic [AW-1:0] pa [2][N];
  logic          tk [2][N]; logic iv [2][N]; logic [W-1:0] id [2][N]; logic ir [2][N];

  for (genvar r = 0; r < 2; r++) begin : g_ring
    ring_network #(.NODES(N), .W(W), .AGE_W(AW), .REVERSE(r == 1)) dut (
      .clk, .rst_n, .peek_valid(pv[r]), .peek_data(pd[r]), .peek_age(pa[r]), .take(tk[r]),
      .inj_valid(iv[r]), .inj_data(id[r]), .inj_ready(ir[r]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int outstanding [2];
  bit live [2][int];
  int unsigned seq = 1;
  bit injecting = 1;
  int unsigned n_hop_checks = 0;

  initial begin
    for (int r = 0; r < 2; r++) for (int i = 0; i < N; i++) begin tk[r][i] = 0; iv[r][i] = 0; id[r][i] = 0; end
    outstanding = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc == 2500) injecting = 0;
      for (int r = 0; r < 2; r++) for (int i = 0; i < N; i++) begin
        tk[r][i] = pv[r][i] && (($urandom % 100) < (injecting ? 25 : 100));
        iv[r][i] = injecting && (($urandom % 100) < 30);
        // tag: [31:8] sequence, [7:0] source node
        id[r][i] = {seq[23:0], 8'(i)}; seq++;
      end
      #1;
      for (int r = 0; r < 2; r++) for (int i = 0; i < N; i++) begin
        check(ir[r][i] == (!pv[r][i] || tk[r][i]), "inj_ready rule");
        if (pv[r][i] && tk[r][i]) begin
          automatic int src = pd[r][i][7:0];
          automatic int hops = (r == 0) ? (i - src + N) % N : (src - i + N) % N;
          check(live[r].exists(pd[r][i]), "taken flit was injected and not yet taken");
          live[r].delete(pd[r][i]);
          if (hops == 0) hops = N;
          if (pa[r][i] < AW'(255)) check((pa[r][i] % N) == (hops % N) && pa[r][i] >= 1, "hop count matches distance");
          outstanding[r]--;
        end
        if (iv[r][i] && ir[r][i]) begin
          live[r][id[r][i]] = 1;
          outstanding[r]++;
        end
      end
      // one hop per cycle: a flit injected now is at the next node next cycle
      for (int r = 0; r < 2; r++) for (int i = 0; i < N; i++) if (iv[r][i] && ir[r][i]) begin
        automatic int nx = (r == 0) ? (i + 1) % N : (i + N - 1) % N;
        automatic logic [W-1:0] tag = id[r][i];
        fork
          begin
            @(posedge clk); #1;
            checks++; n_hop_checks++;
            if (!(pv[r][nx] && pd[r][nx] == tag && pa[r][nx] == 1)) begin
              failures++; $display("FAIL one hop per cycle");
            end
          end
        join_none
      end
    end
    repeat (5) @(posedge clk);
    check(outstanding[0] == 0 && outstanding[1] == 0, "every flit taken once");
    check(live[0].size() == 0 && live[1].size() == 0, "nothing lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
