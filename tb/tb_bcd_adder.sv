// tb_bcd_adder: exhaustive check of the one-digit BCD adder.
// Every pair of decimal digits with both carry-ins is applied; the digit and
// decimal carry are compared with (a + b + cin) / 10 and % 10 worked out in
// integers. A second instance with a 16-bit adder core is checked the same way.
module tb_bcd_adder;
  logic [3:0] a, b, s, s16;
  logic       cin, cout, cout16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  bcd_adder                   dut   (.a(a), .b(b), .cin(cin), .s(s),   .cout(cout));
  bcd_adder #(.CLA_WIDTH(16)) dut16 (.a(a), .b(b), .cin(cin), .s(s16), .cout(cout16));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 10; x++) begin
      for (int y = 0; y < 10; y++) begin
        for (int ci = 0; ci < 2; ci++) begin
          int total;
          a = 4'(x); b = 4'(y); cin = 1'(ci);
          #1;
          total = x + y + ci;
          checks++;
          if (s !== 4'(total % 10) || cout !== (total >= 10)) begin
            failures++;
            if (failures < 10) $display("%0d+%0d+%0d got %b %0d", x, y, ci, cout, s);
          end
          checks++;
          if (s16 !== 4'(total % 10) || cout16 !== (total >= 10)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
