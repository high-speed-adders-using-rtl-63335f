// tb_worked_examples: the worked additions that accompany the design.
//
// Each example is a 4-bit addition, its bits listed least significant first
// (a0 a1 a2 a3): the two carry-chain examples (14 + 8 and 13 + 9, both giving
// sum 6 with a carry out), the modulo-6 residue example (2 + 9 -> 5, via the
// second adder) and the BCD example (1 + 4 = 5, no correction). They are run
// on 4-bit instances, where they are stated, and the residue and BCD examples
// also on the default 8-bit blocks. Sums and per-position carries are
// compared with the values given with the examples.
module tb_worked_examples;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  // 4-bit carry look-ahead adder (one 2-stage even and one 2-stage odd chain)
  logic [3:0] a4, b4, s4, c4;
  logic       cout4;
  mcc_cla #(.WIDTH(4)) u_cla4 (.a(a4), .b(b4), .cin(1'b0), .s(s4), .c(c4), .cout(cout4));

  // residue adders, 4-bit and default 8-bit, modulus 6
  logic [3:0] ra4, rb4, rr4;
  logic       rk4;
  residue_adder #(.N(4), .M(6)) u_res4 (.a(ra4), .b(rb4), .r(rr4), .corrected(rk4));
  logic [7:0] ra8, rb8, rr8;
  logic       rk8;
  residue_adder u_res8 (.a(ra8), .b(rb8), .r(rr8), .corrected(rk8));

  // BCD adder at its default
  logic [3:0] ba, bb, bs;
  logic       bcout;
  bcd_adder u_bcd (.a(ba), .b(bb), .cin(1'b0), .s(bs), .cout(bcout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bit lists as printed: first character is bit 0.
  function automatic logic [3:0] lsb_first(input string bits);
    logic [3:0] v;
    for (int i = 0; i < 4; i++) v[i] = (bits[i] == "1");
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    ra8 = '0; rb8 = '0;
    // even-position example: a = 0111, b = 0001 -> s = 0110, carries 0001
    @(posedge clk);
    a4 = lsb_first("0111"); b4 = lsb_first("0001");
    #1;
    check(s4 == lsb_first("0110"), "even example sum");
    check(c4 == lsb_first("0001"), "even example carries");
    // odd-position example: a = 1011, b = 1001 -> s = 0110, carries 1001
    @(posedge clk);
    a4 = lsb_first("1011"); b4 = lsb_first("1001");
    #1;
    check(s4 == lsb_first("0110"), "odd example sum");
    check(c4 == lsb_first("1001"), "odd example carries");
    // residue example, m = 6: first adder 0100 + 1001 = 1101, carries 0000
    @(posedge clk);
    a4 = lsb_first("0100"); b4 = lsb_first("1001");
    ra4 = a4; rb4 = b4;
    ra8 = {4'b0, a4}; rb8 = {4'b0, b4};
    #1;
    check(s4 == lsb_first("1101") && c4 == 4'b0000, "residue first adder");
    // second adder: 1101 + 0101 (two's complement of 6) = 1010, carries 0101
    a4 = lsb_first("1101"); b4 = lsb_first("0101");
    #1;
    check(s4 == lsb_first("1010"), "residue second adder sum");
    check(c4 == lsb_first("0101"), "residue second adder carries");
    check(rr4 == lsb_first("1010") && rk4, "residue adder 4-bit result");
    check(rr8 == 8'(lsb_first("1010")) && rk8, "residue adder 8-bit result");
    // BCD example: 1000 + 0010 = 1010 (5), below 10, no correction
    @(posedge clk);
    ba = lsb_first("1000"); bb = lsb_first("0010");
    #1;
    check(bs == lsb_first("1010") && !bcout, "bcd example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
