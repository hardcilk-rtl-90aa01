// ring_network: unidirectional ring with one register slot per node.
//
// Every node owns one slot. Each cycle the flit in the slot of node i is
// either taken by node i or moved to the next node (i+1, or i-1 when REVERSE
// is set, so two instances can circulate in opposite directions). A node may
// inject a new flit into the slot after its own whenever its own slot is empty
// or is being taken this cycle. Each flit carries a saturating hop counter
// that counts the hops made (1 at the first node after the injector); nodes may use it to recognise
// flits that have gone round without a taker.
//
// Per node i: peek_valid/peek_data/peek_age show the flit now at node i, the
// node raises take[i] (combinationally, from the peek) to remove it;
// inj_valid/inj_data/inj_ready inject (inj_valid must not depend on
// inj_ready). Latency is one cycle per hop. The ring topology, one unit per
// node and the counter-rotating pair follow the document; the hop counter and
// the take/inject rules are this design's own.
module ring_network #(
  parameter int unsigned NODES   = 4,
  parameter int unsigned W       = 64,
  parameter int unsigned AGE_W   = 8,
  parameter bit          REVERSE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             peek_valid [NODES],
  output logic [W-1:0]     peek_data  [NODES],
  output logic [AGE_W-1:0] peek_age   [NODES],
  input  logic             take       [NODES],
  input  logic             inj_valid  [NODES],
  input  logic [W-1:0]     inj_data   [NODES],
  output logic             inj_ready  [NODES]
);
  logic             slot_v [NODES];
  logic [W-1:0]     slot_d [NODES];
  logic [AGE_W-1:0] slot_a [NODES];

  always_comb begin
    for (int i = 0; i < NODES; i++) begin
      peek_valid[i] = slot_v[i];
      peek_data[i]  = slot_d[i];
      peek_age[i]   = slot_a[i];
      inj_ready[i]  = !slot_v[i] || take[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NODES; i++) begin
        slot_v[i] <= 1'b0;
        slot_d[i] <= '0;
        slot_a[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NODES; i++) begin
        // node i feeds node nx
        automatic int nx = REVERSE ? (i + NODES - 1) % NODES : (i + 1) % NODES;
        if (slot_v[i] && !take[i]) begin
          slot_v[nx] <= 1'b1;
          slot_d[nx] <= slot_d[i];
          slot_a[nx] <= (slot_a[i] == '1) ? slot_a[i] : slot_a[i] + 1'b1;
        end else if (inj_valid[i]) begin
          slot_v[nx] <= 1'b1;
          slot_d[nx] <= inj_data[i];
          slot_a[nx] <= AGE_W'(1);
        end else begin
          slot_v[nx] <= 1'b0;
        end
      end
    end
  end
endmodule
