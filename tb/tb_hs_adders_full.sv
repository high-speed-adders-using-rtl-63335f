// tb_hs_adders_full: the top at its default parameters (8-bit adder core,
// residue modulus 6) taken through a complete set of additions: every
// operand pair of the carry look-ahead adder with both carry-ins, every
// operand pair of the modulo-6 adder and every digit pair of the BCD adder
// with both carry-ins, each compared with integer arithmetic.
module tb_hs_adders_full;
  localparam int unsigned W = 8;
  localparam int unsigned M = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic [W-1:0] cla_a, cla_b, cla_s, cla_c, res_a, res_b, res_r;
  logic         cla_cin, cla_cout, res_k;
  logic [3:0]   bcd_a, bcd_b, bcd_s;
  logic         bcd_cin, bcd_cout;

  hs_adders_top dut (
    .cla_a(cla_a), .cla_b(cla_b), .cla_cin(cla_cin),
    .cla_s(cla_s), .cla_c(cla_c), .cla_cout(cla_cout),
    .res_a(res_a), .res_b(res_b), .res_r(res_r), .res_corrected(res_k),
    .bcd_a(bcd_a), .bcd_b(bcd_b), .bcd_cin(bcd_cin), .bcd_s(bcd_s), .bcd_cout(bcd_cout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cla_a = '0; cla_b = '0; cla_cin = 1'b0;
    res_a = '0; res_b = '0;
    bcd_a = '0; bcd_b = '0; bcd_cin = 1'b0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          @(posedge clk);
          cla_a = W'(x); cla_b = W'(y); cla_cin = 1'(ci);
          #1;
          checks++;
          if ({cla_cout, cla_s} !== (W+1)'(x + y + ci)) failures++;
        end
    for (int x = 0; x < int'(M); x++)
      for (int y = 0; y < int'(M); y++) begin
        @(posedge clk);
        res_a = W'(x); res_b = W'(y);
        #1;
        checks++;
        if (res_r !== W'((x + y) % M) || res_k !== (x + y >= M)) failures++;
      end
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++) begin
          @(posedge clk);
          bcd_a = 4'(x); bcd_b = 4'(y); bcd_cin = 1'(ci);
          #1;
          checks++;
          if (bcd_s !== 4'((x + y + ci) % 10) || bcd_cout !== (x + y + ci >= 10)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
