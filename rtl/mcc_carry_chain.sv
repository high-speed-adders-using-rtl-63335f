// mcc_carry_chain: one multi-output Manchester carry chain.
//
// A chain of STAGES cells, each computing
//   h_0 = G_0 + P_0 . cin
//   h_k = G_k + P_k . h_(k-1)      k = 1 .. STAGES-1
// and bringing every intermediate h_k out, as the taps of a multi-output
// domino gate do. The modified carry look-ahead adder uses two of these: the
// even chain is fed G/P of bit positions 0,2,4,6 and produces h_0,h_2,h_4,h_6;
// the odd chain is fed positions 1,3,5,7 and produces h_1,h_3,h_5,h_7. Both
// take the adder's carry-in. The chain length of 4 follows the document (it
// keeps the series transistor stack of the domino gate short); the shared cin
// input at the foot of both chains is this design's reading of the boundary.
// Combinational: the domino precharge/evaluate phases are not modelled, the
// outputs follow the inputs directly.
module mcc_carry_chain #(
  parameter int unsigned STAGES = mcc_pkg::CHAIN_STAGES
) (
  input  logic [STAGES-1:0] gen,   // new generate  G of the chain's positions
  input  logic [STAGES-1:0] prop,  // new propagate P of the chain's positions
  input  logic              cin,   // carry entering the foot of the chain
  output logic [STAGES-1:0] h      // intermediate carries, one per stage
);

  // Carry entering each stage: cin for the first, the previous tap after.
  logic [STAGES-1:0] h_in;

  assign h_in[0] = cin;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    if (k > 0) begin : g_link
      assign h_in[k] = h[k-1];
    end
    assign h[k] = gen[k] | (prop[k] & h_in[k]);
  end

endmodule
