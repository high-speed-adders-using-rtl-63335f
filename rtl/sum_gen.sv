// sum_gen: sum bits and true carries of the modified carry look-ahead adder.
//
// The carry chains deliver the intermediate carries h_i; the true carry out of
// position i is c_i = t_i . h_i. Each sum bit is the XOR of the position's
// propagate with the carry coming from below:
//   s_0 = p_0 ^ cin,   s_i = p_i ^ c_(i-1)
// and the adder's carry out is c_(WIDTH-1). All true carries are brought out
// too, so that a user of the adder (the BCD adder) can read an intermediate
// one. The XOR sum cell follows the document; bringing out c and forming it as
// t_i . h_i is how this design reads the modified chain. Combinational.
module sum_gen #(
  parameter int unsigned WIDTH = mcc_pkg::CLA_WIDTH
) (
  input  logic [WIDTH-1:0] p,      // XOR propagate
  input  logic [WIDTH-1:0] t,      // OR propagate
  input  logic [WIDTH-1:0] h,      // intermediate carries of the chains
  input  logic             cin,
  output logic [WIDTH-1:0] s,      // sum
  output logic [WIDTH-1:0] c,      // true carry out of every position
  output logic             cout
);

  always_comb begin
    c    = t & h;
    s    = p ^ {c[WIDTH-2:0], cin};
    cout = c[WIDTH-1];
  end

endmodule
