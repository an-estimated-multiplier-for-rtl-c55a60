// subtractor_tb: checks the carry-lookahead subtractor at 17 bits (the
// multiplier's term width, a partial last group), 8 bits (whole groups,
// exhaustive) and 2 bits against integer subtraction, difference and borrow.
module subtractor_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [16:0] a17, b17, d17;
  logic [7:0]  a8, b8, d8;
  logic [1:0]  a2, b2, d2;
  logic        bo17, bo8, bo2;

  subtractor #(.W(17)) s17 (.a(a17), .b(b17), .diff(d17), .borrow(bo17));
  subtractor #(.W(8))  s8  (.a(a8),  .b(b8),  .diff(d8),  .borrow(bo8));
  subtractor #(.W(2))  s2  (.a(a2),  .b(b2),  .diff(d2),  .borrow(bo2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 65536; n++) begin
      a17 = 17'($urandom); b17 = 17'($urandom);
      if (n % 8 == 0) b17 = a17 + 17'(n % 3) - 17'd1;
      a8 = 8'(n); b8 = 8'(n >> 8);
      a2 = 2'(n); b2 = 2'(n >> 2);
      #1;
      check(d17 == 17'(a17 - b17) && bo17 == (b17 > a17), "17-bit");
      check(d8 == 8'(a8 - b8) && bo8 == (b8 > a8), "8-bit");
      check(d2 == 2'(a2 - b2) && bo2 == (b2 > a2), "2-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
