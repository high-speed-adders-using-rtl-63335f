// new_gp_gen: the "new" generate and propagate signals of the modified
// Manchester carry chain.
//
// The ordinary carry recurrence c_i = g_i + t_i c_(i-1) is unrolled by one
// position so that each carry depends on the carry two positions below it:
//   c_i = t_i . h_i,   h_i = G_i + P_i . h_(i-2)
// with the new generate and propagate
//   G_i = g_i + g_(i-1)
//   P_i = p_i . p_(i-1) . t_(i-2)
// Because a position never both generates and XOR-propagates, G_i and P_i are
// never 1 together, so a domino chain built on them has no competing pull-down
// paths. The even positions then form one carry chain and the odd positions
// another, and the two run in parallel.
//
// The two lowest positions have no (i-1) or (i-2) neighbour; this design takes
// g_(-1) = 0 and p_(-1) = t_(-2) = 1 there, which gives
//   G_0 = g_0, P_0 = p_0   and   G_1 = g_1 + g_0, P_1 = p_1 . p_0
// so that each chain's first stage combines its G and P with the adder's
// carry-in. Those boundary values are this design's choice; the formulas for
// G_i and P_i follow the document. Purely combinational, no latency.
module new_gp_gen #(
  parameter int unsigned WIDTH = mcc_pkg::CLA_WIDTH
) (
  input  logic [WIDTH-1:0] g,      // generate  a_i & b_i
  input  logic [WIDTH-1:0] p,      // XOR propagate a_i ^ b_i
  input  logic [WIDTH-1:0] t,      // OR propagate  a_i | b_i
  output logic [WIDTH-1:0] gn,     // new generate  G_i
  output logic [WIDTH-1:0] pn      // new propagate P_i
);

  always_comb begin
    gn[0] = g[0];
    pn[0] = p[0];
    if (WIDTH > 1) begin
      gn[1] = g[1] | g[0];
      pn[1] = p[1] & p[0];
    end
    for (int unsigned i = 2; i < WIDTH; i++) begin
      gn[i] = g[i] | g[i-1];
      pn[i] = p[i] & p[i-1] & t[i-2];
    end
  end

endmodule
