// residue_adder: modulo-M adder built from two modified carry look-ahead
// adders and a multiplexer.
//
//   r = (a + b) mod M,     for operands 0 <= a, b < M
//
// Stage 1 adds the operands: {c1, s1} = a + b.
// Stage 2 adds the constant 2^N - M (the two's complement of M) to that sum:
//   {c2, s2} = s1 + (2^N - M).
// If either carry is set, a + b >= M and s2 (= a + b - M, mod 2^N) is the
// residue; otherwise s1 is. Both stages are mcc_cla instances; the whole
// block is combinational with no latency. `corrected` reports which operand
// of the multiplexer was taken.
//
// The two-adder-and-multiplexer structure and the selection rule follow the
// document, as does the default modulus M = 6, the one used in its example.
// The width N = 8 is that of the document's 8-bit adder core. Operands of M or
// more are outside the block's range and give an unspecified residue.
// M must lie in 2 .. 2^N. The per-position carry outputs of the two adders
// are not needed here and are left unused on purpose.
module residue_adder #(
  parameter int unsigned N = mcc_pkg::CLA_WIDTH,
  parameter int unsigned M = 6
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r,
  output logic         corrected   // 1: a + b >= M, M was subtracted
);

  if (M < 2 || M > (1 << N)) begin : g_bad_modulus
    $error("residue_adder: M must lie in 2 .. 2**N");
  end

  // 2^N - M, reduced to N bits (0 when M = 2^N).
  localparam logic [N:0]   M_WIDE = (N+1)'(M);
  localparam logic [N-1:0] M_COMP = N'((1 << N) - M_WIDE);

  logic [N-1:0] s1, s2;
  logic [N-1:0] c1_all, c2_all;
  logic         c1, c2;

  mcc_cla #(.WIDTH(N)) u_add_ab (
    .a(a), .b(b), .cin(1'b0), .s(s1), .c(c1_all), .cout(c1)
  );

  mcc_cla #(.WIDTH(N)) u_add_mcomp (
    .a(s1), .b(M_COMP), .cin(1'b0), .s(s2), .c(c2_all), .cout(c2)
  );

  always_comb begin
    corrected = c1 | c2;
    r         = corrected ? s2 : s1;
  end

endmodule
