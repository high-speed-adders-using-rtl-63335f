// mcc_pkg: sizes shared by the multi-output Manchester carry chain adders.
//
// The adder core is an 8-bit carry look-ahead adder whose carries are
// produced by two independent 4-stage Manchester carry chains, one for the
// even bit positions and one for the odd ones. The residue adder and the BCD
// adder are built from that core. These constants are the defaults of the
// modules' parameters; the 8-bit width and the 4-stage chains are the sizes
// the adder is presented at, the BCD digit width and the +6 correction follow
// from the BCD code itself.
package mcc_pkg;

  // Width of the carry look-ahead adder core (bits).
  parameter int unsigned CLA_WIDTH    = 8;
  // Stages of each of the two (even / odd) carry chains: CLA_WIDTH / 2.
  parameter int unsigned CHAIN_STAGES = CLA_WIDTH / 2;
  // Width of one BCD digit.
  parameter int unsigned BCD_DIGIT_W  = 4;
  // Largest value a BCD digit may hold.
  parameter logic [BCD_DIGIT_W-1:0] BCD_MAX_DIGIT = 4'd9;
  // Correction added to a binary digit sum that is not a valid decimal digit.
  parameter logic [BCD_DIGIT_W-1:0] BCD_CORRECTION = 4'd6;

endpackage
