// tb_hs_adders_top: end-to-end test of the three adders through the top.
//
// Two tops are instantiated: one at its defaults (8-bit core, modulus 6) and
// one with modulus 251, where a + b can overflow the first adder of the
// residue adder. Every adder is driven exhaustively over its valid operands
// and compared with integer arithmetic. The testbench counts how often each
// mechanism of the design occurred and fails if one never did:
//   cla_cin      the carry-in changed the sum
//   cla_fullprop a carry-in travelled through all eight positions
//   cla_cout     the adder produced a carry out
//   res_plain    residue taken from the first adder (a + b < M)
//   res_c2       residue from the second adder, selected by its carry
//   res_c1       residue from the second adder, first adder overflowed
//   bcd_plain    BCD digit sum of 9 or less, no correction
//   bcd_over9    binary digit sum 10..15, +6 correction
//   bcd_binc     binary digit sum 16 or more (binary carry), +6 correction
module tb_hs_adders_top;
  localparam int unsigned W = 8;

  typedef enum int unsigned {
    CLA_CIN, CLA_FULLPROP, CLA_COUT, RES_PLAIN, RES_C2, RES_C1,
    BCD_PLAIN, BCD_OVER9, BCD_BINC, N_MECH
  } mech_e;

  int seen [N_MECH];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  logic [W-1:0] cla_a, cla_b, cla_s, cla_c, res_a, res_b, res_r, res_r251;
  logic [W-1:0] cla_s251, cla_c251;
  logic         cla_cin, cla_cout, cla_cout251, res_k, res_k251;
  logic [3:0]   bcd_a, bcd_b, bcd_s, bcd_s251;
  logic         bcd_cin, bcd_cout, bcd_cout251;

  hs_adders_top dut (
    .cla_a(cla_a), .cla_b(cla_b), .cla_cin(cla_cin),
    .cla_s(cla_s), .cla_c(cla_c), .cla_cout(cla_cout),
    .res_a(res_a), .res_b(res_b), .res_r(res_r), .res_corrected(res_k),
    .bcd_a(bcd_a), .bcd_b(bcd_b), .bcd_cin(bcd_cin), .bcd_s(bcd_s), .bcd_cout(bcd_cout)
  );

  hs_adders_top #(.RES_M(251)) dut_m251 (
    .cla_a(cla_a), .cla_b(cla_b), .cla_cin(cla_cin),
    .cla_s(cla_s251), .cla_c(cla_c251), .cla_cout(cla_cout251),
    .res_a(res_a), .res_b(res_b), .res_r(res_r251), .res_corrected(res_k251),
    .bcd_a(bcd_a), .bcd_b(bcd_b), .bcd_cin(bcd_cin), .bcd_s(bcd_s251), .bcd_cout(bcd_cout251)
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

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    cla_a = '0; cla_b = '0; cla_cin = 1'b0;
    res_a = '0; res_b = '0;
    bcd_a = '0; bcd_b = '0; bcd_cin = 1'b0;
    foreach (seen[i]) seen[i] = 0;

    // --- carry look-ahead adder: every operand pair, both carry-ins
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int ci = 0; ci < 2; ci++) begin
          int total;
          @(posedge clk);
          cla_a = W'(x); cla_b = W'(y); cla_cin = 1'(ci);
          #1;
          total = x + y + ci;
          expect_true({cla_cout, cla_s} == (W+1)'(total), $sformatf("cla %0d+%0d+%0d", x, y, ci));
          expect_true({cla_cout251, cla_s251} == {cla_cout, cla_s}, "cla copy");
          if (ci == 1 && cla_s != W'(x + y)) seen[CLA_CIN]++;
          if (ci == 1 && (x ^ y) == 255) begin
            seen[CLA_FULLPROP]++;
            expect_true(cla_c == 8'hff, "full propagate carries");
          end
          if (cla_cout) seen[CLA_COUT]++;
        end
      end
    end

    // --- residue adders: modulus 6 (default) and 251
    for (int x = 0; x < 251; x++) begin
      for (int y = 0; y < 251; y++) begin
        @(posedge clk);
        res_a = W'(x); res_b = W'(y);
        #1;
        if (x < 6 && y < 6) begin
          expect_true(res_r == W'((x + y) % 6) && res_k == (x + y >= 6),
                      $sformatf("res6 %0d+%0d got %0d", x, y, res_r));
          if (res_k) seen[RES_C2]++; else seen[RES_PLAIN]++;
        end
        expect_true(res_r251 == W'((x + y) % 251) && res_k251 == (x + y >= 251),
                    $sformatf("res251 %0d+%0d got %0d", x, y, res_r251));
        if (x + y >= 256) seen[RES_C1]++;
        else if (x + y >= 251) seen[RES_C2]++;
        else seen[RES_PLAIN]++;
      end
    end

    // --- BCD adder: every pair of digits, both carry-ins
    for (int x = 0; x < 10; x++) begin
      for (int y = 0; y < 10; y++) begin
        for (int ci = 0; ci < 2; ci++) begin
          int total;
          @(posedge clk);
          bcd_a = 4'(x); bcd_b = 4'(y); bcd_cin = 1'(ci);
          #1;
          total = x + y + ci;
          expect_true(bcd_s == 4'(total % 10) && bcd_cout == (total >= 10),
                      $sformatf("bcd %0d+%0d+%0d got %b %0d", x, y, ci, bcd_cout, bcd_s));
          expect_true(bcd_s251 == bcd_s && bcd_cout251 == bcd_cout, "bcd copy");
          if (total <= 9) seen[BCD_PLAIN]++;
          else if (total <= 15) seen[BCD_OVER9]++;
          else seen[BCD_BINC]++;
        end
      end
    end

    for (int i = 0; i < N_MECH; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-14s seen %0d times", m.name(), seen[i]);
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
