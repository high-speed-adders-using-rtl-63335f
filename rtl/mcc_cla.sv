// mcc_cla: carry look-ahead adder with two parallel Manchester carry chains.
//
//   {cout, s} = a + b + cin
//
// Structure (all combinational, no clock, no latency):
//   gp_gen          g = a&b, p = a^b, t = a|b per bit
//   new_gp_gen      G_i = g_i + g_(i-1),  P_i = p_i . p_(i-1) . t_(i-2)
//   mcc_carry_chain even chain over positions 0,2,..,WIDTH-2
//   mcc_carry_chain odd  chain over positions 1,3,..,WIDTH-1
//   sum_gen         c_i = t_i . h_i,  s_i = p_i ^ c_(i-1)
// Because h_i depends only on h_(i-2), the even and odd carries never wait on
// each other and the longest carry path is WIDTH/2 chain stages instead of
// WIDTH. Every true carry c_i is also an output (multi-output adder).
//
// The 8-bit width with two 4-stage chains is the configuration the document
// presents. The domino precharge/evaluate clocking of the circuit is not
// modelled: the RTL describes the logic function the domino gates evaluate.
// WIDTH must be even and at least 2.
module mcc_cla #(
  parameter int unsigned WIDTH = mcc_pkg::CLA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c,      // carry out of every bit position
  output logic             cout
);

  localparam int unsigned HALF = WIDTH / 2;

  if (WIDTH < 2 || (WIDTH % 2) != 0) begin : g_bad_width
    $error("mcc_cla: WIDTH must be even and at least 2");
  end

  logic [WIDTH-1:0] g, p, t;       // per-bit generate / propagate
  logic [WIDTH-1:0] gn, pn;        // new generate / propagate
  logic [WIDTH-1:0] h;             // intermediate carries, bit-ordered
  logic [HALF-1:0]  ev_g, ev_p, ev_h;
  logic [HALF-1:0]  od_g, od_p, od_h;

  gp_gen #(.WIDTH(WIDTH)) u_gp (
    .a(a), .b(b), .g(g), .p(p), .t(t)
  );

  new_gp_gen #(.WIDTH(WIDTH)) u_new_gp (
    .g(g), .p(p), .t(t), .gn(gn), .pn(pn)
  );

  // Split the new G/P into the even and odd positions and merge the chain
  // outputs back into bit order.
  always_comb begin
    for (int unsigned k = 0; k < HALF; k++) begin
      ev_g[k]   = gn[2*k];
      ev_p[k]   = pn[2*k];
      od_g[k]   = gn[2*k+1];
      od_p[k]   = pn[2*k+1];
      h[2*k]    = ev_h[k];
      h[2*k+1]  = od_h[k];
    end
  end

  mcc_carry_chain #(.STAGES(HALF)) u_even_chain (
    .gen(ev_g), .prop(ev_p), .cin(cin), .h(ev_h)
  );

  mcc_carry_chain #(.STAGES(HALF)) u_odd_chain (
    .gen(od_g), .prop(od_p), .cin(cin), .h(od_h)
  );

  sum_gen #(.WIDTH(WIDTH)) u_sum (
    .p(p), .t(t), .h(h), .cin(cin), .s(s), .c(c), .cout(cout)
  );

endmodule
