// bcd_adder: one-digit decimal (BCD) adder on the modified carry look-ahead
// adder.
//
//   {cout, s} = a + b + cin  in decimal, a, b in 0..9, s in 0..9
//
// Stage 1 adds the two digits in binary on an mcc_cla of CLA_WIDTH bits, the
// digits sitting in its low four bits. Its carry out of bit 3, z4, is read
// straight from the adder's carry outputs. The binary sum z is not a valid
// decimal digit when it exceeds 9, that is when
//   k = z4 | (z[3:0] > 9)
// and then stage 2, a second mcc_cla, adds 6 (0110) to the low four bits,
// which skips the six unused codes and leaves the decimal digit; k is the
// decimal carry out. With k = 0 stage 2 adds 0 and the binary sum stands.
// Combinational, no latency.
//
// The two-adder structure with the "add 6 when over 9" rule follows the
// document, as does the 8-bit adder core (CLA_WIDTH = 8). Reading the carry
// out of bit 3 from the first adder's carry outputs is this design's choice.
// The upper CLA_WIDTH-4 bits of both adders carry zeros; their sums and
// carries are left unused on purpose.
// Inputs above 9 are outside the block's range. CLA_WIDTH must be even and
// at least 6 so that the carry out of bit 3 is an internal carry.
module bcd_adder #(
  parameter int unsigned CLA_WIDTH = mcc_pkg::CLA_WIDTH
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  import mcc_pkg::BCD_CORRECTION;
  import mcc_pkg::BCD_MAX_DIGIT;

  if (CLA_WIDTH < 6) begin : g_bad_width
    $error("bcd_adder: CLA_WIDTH must be at least 6");
  end

  localparam int unsigned PAD = CLA_WIDTH - 4;

  logic [CLA_WIDTH-1:0] z, z_c, y, y_c;
  logic                 z_cout, y_cout;
  logic                 k;
  logic [3:0]           corr;

  mcc_cla #(.WIDTH(CLA_WIDTH)) u_binary_add (
    .a({{PAD{1'b0}}, a}), .b({{PAD{1'b0}}, b}), .cin(cin),
    .s(z), .c(z_c), .cout(z_cout)
  );

  always_comb begin
    k    = z_c[3] | (z[3:0] > BCD_MAX_DIGIT);
    corr = k ? BCD_CORRECTION : 4'd0;
  end

  mcc_cla #(.WIDTH(CLA_WIDTH)) u_correct_add (
    .a({{PAD{1'b0}}, z[3:0]}), .b({{PAD{1'b0}}, corr}), .cin(1'b0),
    .s(y), .c(y_c), .cout(y_cout)
  );

  always_comb begin
    s    = y[3:0];
    cout = k;
  end

endmodule
