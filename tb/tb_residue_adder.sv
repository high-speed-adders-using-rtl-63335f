// tb_residue_adder: checks the modulo-M adder.
// The default instance (8 bits, M = 6) and instances with M = 251, 200 and
// 256 are driven with every operand pair below their modulus; the residue
// and the `corrected` flag are compared with (a + b) mod M and a + b >= M.
module tb_residue_adder;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0] r6, r251, r200, r256;
  logic         k6, k251, k200, k256;
  int checks = 0, failures = 0;
  int wrap_count = 0;            // cases where the first adder itself overflowed
  logic clk = 1'b0;
  int cycles = 0;

  residue_adder                 dut6   (.a(a), .b(b), .r(r6),   .corrected(k6));
  residue_adder #(.N(N), .M(251)) dut251 (.a(a), .b(b), .r(r251), .corrected(k251));
  residue_adder #(.N(N), .M(200)) dut200 (.a(a), .b(b), .r(r200), .corrected(k200));
  residue_adder #(.N(N), .M(256)) dut256 (.a(a), .b(b), .r(r256), .corrected(k256));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input logic [N-1:0] r, input logic k, input int x, input int y);
    checks++;
    if (r !== N'((x + y) % m) || k !== (x + y >= m)) begin
      failures++;
      if (failures < 10) $display("M=%0d a=%0d b=%0d got r=%0d k=%b", m, x, y, r, k);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = N'(x); b = N'(y);
        #1;
        if (x < 6 && y < 6)     check(6, r6, k6, x, y);
        if (x < 251 && y < 251) begin
          check(251, r251, k251, x, y);
          if (x + y >= 256) wrap_count++;
        end
        if (x < 200 && y < 200) check(200, r200, k200, x, y);
        check(256, r256, k256, x, y);
      end
    end
    checks++;
    if (wrap_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
