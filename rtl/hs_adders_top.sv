// hs_adders_top: the three adders of the design side by side.
//
//   cla_*  an 8-bit carry look-ahead adder whose carries come from two
//          parallel multi-output Manchester carry chains (even / odd bits)
//   res_*  a modulo-RES_M adder made of two such adders and a multiplexer
//   bcd_*  a one-digit BCD adder made of two such adders and a +6 correction
// The three are independent: each has its own operands and results and no
// signal passes between them. Everything is combinational; results follow the
// operands with no clock and no latency. Parameter defaults are the document's
// sizes (8-bit adder core, modulus 6 from its residue-adder example).
module hs_adders_top #(
  parameter int unsigned WIDTH = mcc_pkg::CLA_WIDTH,
  parameter int unsigned RES_M = 6
) (
  // 8-bit modified-MCC carry look-ahead adder
  input  logic [WIDTH-1:0] cla_a,
  input  logic [WIDTH-1:0] cla_b,
  input  logic             cla_cin,
  output logic [WIDTH-1:0] cla_s,
  output logic [WIDTH-1:0] cla_c,
  output logic             cla_cout,
  // residue (modulo RES_M) adder
  input  logic [WIDTH-1:0] res_a,
  input  logic [WIDTH-1:0] res_b,
  output logic [WIDTH-1:0] res_r,
  output logic             res_corrected,
  // one-digit BCD adder
  input  logic [3:0]       bcd_a,
  input  logic [3:0]       bcd_b,
  input  logic             bcd_cin,
  output logic [3:0]       bcd_s,
  output logic             bcd_cout
);

  mcc_cla #(.WIDTH(WIDTH)) u_cla (
    .a(cla_a), .b(cla_b), .cin(cla_cin),
    .s(cla_s), .c(cla_c), .cout(cla_cout)
  );

  residue_adder #(.N(WIDTH), .M(RES_M)) u_residue (
    .a(res_a), .b(res_b), .r(res_r), .corrected(res_corrected)
  );

  bcd_adder #(.CLA_WIDTH(WIDTH)) u_bcd (
    .a(bcd_a), .b(bcd_b), .cin(bcd_cin), .s(bcd_s), .cout(bcd_cout)
  );

endmodule
