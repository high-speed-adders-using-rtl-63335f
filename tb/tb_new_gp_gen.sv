// tb_new_gp_gen: checks the new generate / propagate signals.
// For every 8-bit operand pair, g/p/t are formed in the testbench and G_i, P_i
// compared with their definitions (G_i = g_i + g_(i-1),
// P_i = p_i p_(i-1) t_(i-2), with g_(-1) = 0 and p_(-1) = t_(-2) = 1).
// It also checks that G_i and P_i are never both 1 and that the recurrence
// h_i = G_i + P_i h_(i-2), c_i = t_i h_i built from them reproduces the
// carries of a + b + cin.
module tb_new_gp_gen;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, g, p, t, gn, pn;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  new_gp_gen dut (.g(g), .p(p), .t(t), .gn(gn), .pn(pn));

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
        g = a & b; p = a ^ b; t = a | b;
        #1;
        for (int i = 0; i < int'(W); i++) begin
          logic eg, ep, gm1, pm1, tm2;
          gm1 = (i >= 1) ? g[i-1] : 1'b0;
          pm1 = (i >= 1) ? p[i-1] : 1'b1;
          tm2 = (i >= 2) ? t[i-2] : 1'b1;
          eg  = g[i] | gm1;
          ep  = p[i] & pm1 & tm2;
          checks++;
          if (gn[i] !== eg || pn[i] !== ep) begin
            failures++;
            if (failures < 10)
              $display("bit %0d a=%h b=%h G=%b P=%b exp %b %b", i, a, b, gn[i], pn[i], eg, ep);
          end
          checks++;
          if ((gn[i] & pn[i]) !== 1'b0) failures++;
        end
        for (int cin = 0; cin < 2; cin++) begin
          logic [W-1:0] h, c;
          int sum;
          for (int i = 0; i < int'(W); i++) begin
            logic below;
            below = (i >= 2) ? h[i-2] : 1'(cin);
            h[i] = gn[i] | (pn[i] & below);
            c[i] = t[i] & h[i];
          end
          for (int i = 0; i < int'(W); i++) begin
            sum = (ia % (1 << (i+1))) + (ib % (1 << (i+1))) + cin;
            checks++;
            if (c[i] !== 1'((sum >> (i+1)) & 1)) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
