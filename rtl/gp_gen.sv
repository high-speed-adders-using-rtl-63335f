// gp_gen: per-bit generate and propagate signals of a carry look-ahead adder.
//
// For every bit position i it forms
//   g_i = a_i & b_i   (generate: the position creates a carry)
//   p_i = a_i ^ b_i   (XOR propagate: the position passes a carry on, and is
//                      the half-sum used by the sum bit)
//   t_i = a_i | b_i   (OR propagate, "transmit": the position does not kill
//                      a carry)
// In a domino implementation each of the three is one dynamic gate evaluated
// in the same clock phase; here they are plain combinational logic with no
// clock and no latency. The three functions follow the document; the vector
// form of the interface is this design's own.
module gp_gen #(
  parameter int unsigned WIDTH = mcc_pkg::CLA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] t
);

  always_comb begin
    g = a & b;
    p = a ^ b;
    t = a | b;
  end

endmodule
