// tb_sum_gen: checks the sum and carry cells.
// For every 8-bit operand pair and carry-in the testbench forms p = a^b,
// t = a|b and intermediate carries h that satisfy t_i h_i = true carry
// (h_i is random where t_i = 0, since the cell must ignore it there).
// The block's sum, per-position carries and carry out are compared with
// integer addition.
module tb_sum_gen;
  localparam int unsigned W = 8;
  logic [W-1:0] p, t, h, s, c;
  logic cin, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  sum_gen dut (.p(p), .t(t), .h(h), .cin(cin), .s(s), .c(c), .cout(cout));

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
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        for (int ic = 0; ic < 2; ic++) begin
          logic [W-1:0] a, b, ctrue;
          int total;
          a = W'(ia); b = W'(ib);
          for (int i = 0; i < int'(W); i++) begin
            int part;
            part = (ia % (1 << (i+1))) + (ib % (1 << (i+1))) + ic;
            ctrue[i] = 1'((part >> (i+1)) & 1);
          end
          p   = a ^ b;
          t   = a | b;
          h   = ctrue | (~t & W'($urandom));
          cin = 1'(ic);
          #1;
          total = ia + ib + ic;
          checks++;
          if ({cout, s} !== (W+1)'(total) || c !== ctrue) begin
            failures++;
            if (failures < 10) $display("a=%h b=%h cin=%0d got %b_%h c=%b", a, b, ic, cout, s, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
