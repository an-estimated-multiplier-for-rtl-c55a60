// ks_adder_tb: checks the Kogge-Stone adder at 17 bits (the multiplier's
// term width), 16 bits and 5 bits (exhaustive) against integer addition,
// sum and carry out.
module ks_adder_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [16:0] a17, b17, s17;
  logic [15:0] a16, b16, s16;
  logic [4:0]  a5, b5, s5;
  logic        ci, co17, co16, co5;

  ks_adder #(.W(17)) d17 (.a(a17), .b(b17), .cin(ci), .sum(s17), .cout(co17));
  ks_adder #(.W(16)) d16 (.a(a16), .b(b16), .cin(ci), .sum(s16), .cout(co16));
  ks_adder #(.W(5))  d5  (.a(a5),  .b(b5),  .cin(ci), .sum(s5),  .cout(co5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint r17, r16;
      a17 = 17'($urandom); b17 = 17'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (n % 10 == 0) begin b17 = ~a17; b16 = ~a16; end  // long carry chains
      ci  = 1'($urandom);
      a5  = 5'(n); b5 = 5'(n >> 5);
      #1;
      r17 = longint'(a17) + longint'(b17) + longint'(ci);
      r16 = longint'(a16) + longint'(b16) + longint'(ci);
      check({co17, s17} == 18'(r17), "17-bit sum");
      check({co16, s16} == 17'(r16), "16-bit sum");
      check({co5, s5} == 6'(int'(a5) + int'(b5) + int'(ci)), "5-bit sum");
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
