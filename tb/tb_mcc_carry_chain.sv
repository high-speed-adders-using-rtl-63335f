// tb_mcc_carry_chain: exhaustive check of one 4-stage carry chain.
// All 2^9 combinations of G, P and cin are applied. The expected tap k is 1
// exactly when some stage j <= k generates and every stage above j up to k
// propagates, or when cin enters and every stage 0..k propagates.
module tb_mcc_carry_chain;
  localparam int unsigned S = 4;
  logic [S-1:0] gen, prop, h;
  logic cin;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  mcc_carry_chain dut (.gen(gen), .prop(prop), .cin(cin), .h(h));

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
    for (int v = 0; v < (1 << (2*S+1)); v++) begin
      {cin, prop, gen} = (2*S+1)'(v);
      #1;
      for (int k = 0; k < int'(S); k++) begin
        logic exp_h, all_p;
        exp_h = 1'b0;
        // a generating stage j whose carry is passed through j+1..k
        for (int j = 0; j <= k; j++) begin
          all_p = 1'b1;
          for (int m = j + 1; m <= k; m++) all_p &= prop[m];
          if (gen[j] && all_p) exp_h = 1'b1;
        end
        all_p = 1'b1;
        for (int m = 0; m <= k; m++) all_p &= prop[m];
        if (cin && all_p) exp_h = 1'b1;
        checks++;
        if (h[k] !== exp_h) begin
          failures++;
          if (failures < 10) $display("v=%h tap %0d got %b exp %b", v, k, h[k], exp_h);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
