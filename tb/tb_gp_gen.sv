// tb_gp_gen: exhaustive check of the per-bit generate / propagate cells.
// Every pair of 8-bit operands is applied; each bit of g, p and t is compared
// with the truth table of AND, XOR and OR written out per bit.
module tb_gp_gen;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, g, p, t;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  gp_gen dut (.a(a), .b(b), .g(g), .p(p), .t(t));

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
        a = W'(ia); b = W'(ib);
        #1;
        for (int i = 0; i < W; i++) begin
          logic ea, eb;
          ea = a[i]; eb = b[i];
          checks++;
          if (g[i] !== (ea == 1'b1 && eb == 1'b1)) failures++;
          if (p[i] !== (ea != eb))                 failures++;
          if (t[i] !== (ea == 1'b1 || eb == 1'b1)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
