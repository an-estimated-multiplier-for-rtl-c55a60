// sign_detector_tb: exhaustive check of the sign detector for 8-bit
// operands, in signed and in unsigned mode. Expected magnitudes and signs
// come from integer arithmetic on the operand values.
module sign_detector_tb;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [N-1:0] a, b, ma_s, mb_s, ma_u, mb_u;
  logic na_s, nb_s, np_s, na_u, nb_u, np_u;

  sign_detector #(.N(N), .SIGNED(1'b1)) dut_s (
    .a(a), .b(b), .mag_a(ma_s), .mag_b(mb_s), .neg_a(na_s), .neg_b(nb_s), .neg_p(np_s));
  sign_detector #(.N(N), .SIGNED(1'b0)) dut_u (
    .a(a), .b(b), .mag_a(ma_u), .mag_b(mb_u), .neg_a(na_u), .neg_b(nb_u), .neg_p(np_u));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, a, b);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int sa, sb;
        a = N'(i); b = N'(j);
        #1;
        sa = (i >= 128) ? i - 256 : i;
        sb = (j >= 128) ? j - 256 : j;
        check(ma_s == N'((sa < 0) ? -sa : sa), "signed |A|");
        check(mb_s == N'((sb < 0) ? -sb : sb), "signed |B|");
        check(na_s == (sa < 0) && nb_s == (sb < 0), "signed operand signs");
        check(np_s == ((sa < 0) != (sb < 0)), "signed product sign");
        check(ma_u == N'(i) && mb_u == N'(j) && !na_u && !nb_u && !np_u, "unsigned");
      end
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
