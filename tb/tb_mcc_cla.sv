// tb_mcc_cla: checks the modified-MCC carry look-ahead adder.
// The 8-bit adder is checked exhaustively (all operands, both carry-ins):
// sum, carry out and every per-position carry against integer addition.
// A 16-bit instance (two 8-stage chains) gets random operands.
module tb_mcc_cla;
  localparam int unsigned W = 8;
  localparam int unsigned W2 = 16;
  logic [W-1:0]  a, b, s, c;
  logic          cin, cout;
  logic [W2-1:0] a2, b2, s2, c2;
  logic          cin2, cout2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  mcc_cla                dut   (.a(a),  .b(b),  .cin(cin),  .s(s),  .c(c),  .cout(cout));
  mcc_cla #(.WIDTH(W2)) dut16 (.a(a2), .b(b2), .cin(cin2), .s(s2), .c(c2), .cout(cout2));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] carries(input int unsigned x, input int unsigned y,
                                          input int unsigned ci, input int unsigned n);
    logic [31:0] r = '0;
    for (int unsigned i = 0; i < n; i++) begin
      longint unsigned m, part;
      m = 64'(1) << (i + 1);
      part = (64'(x) % m) + (64'(y) % m) + 64'(ci);
      r[i] = part[i+1];
    end
    return r;
  endfunction

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        for (int ic = 0; ic < 2; ic++) begin
          a = W'(ia); b = W'(ib); cin = 1'(ic);
          #1;
          checks++;
          if ({cout, s} !== (W+1)'(ia + ib + ic) || c !== W'(carries(ia, ib, ic, W))) begin
            failures++;
            if (failures < 10) $display("a=%h b=%h cin=%0d got %b_%h c=%b", a, b, ic, cout, s, c);
          end
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      int unsigned x, y, ci;
      x = $urandom & 32'hffff; y = $urandom & 32'hffff; ci = $urandom & 1;
      if (n % 4 == 0) y = ~x & 32'hffff;          // full-length propagate
      a2 = W2'(x); b2 = W2'(y); cin2 = 1'(ci);
      #1;
      checks++;
      if ({cout2, s2} !== (W2+1)'(x + y + ci) || c2 !== W2'(carries(x, y, ci, W2))) begin
        failures++;
        if (failures < 10) $display("16b a=%h b=%h cin=%0d got %b_%h", a2, b2, ci, cout2, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
