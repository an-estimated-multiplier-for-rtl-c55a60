// rounding_tb: exhaustive check of the rounding block for 8-bit magnitudes
// (and a 5-bit instance). The reference searches every power of two for the
// nearest one, ties to the larger, and compares Ar, Br, the exponents and
// the non-zero flags. It also counts that ties (3 * 2^(p-2)) were met.
module rounding_tb;
  import tb_ref_pkg::*;
  localparam int N = 8;
  localparam int M = 5;
  int checks = 0, failures = 0, ties = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [N-1:0] ma, mb;
  logic [3:0]   ea, eb;
  logic [N:0]   ar, br;
  logic         za, zb;
  logic [M-1:0] sa, sb;
  logic [2:0]   xa, xb;
  logic [M:0]   sar, sbr;
  logic         sza, szb;

  rounding #(.N(N)) dut (.mag_a(ma), .mag_b(mb), .exp_a(ea), .exp_b(eb),
                         .ar(ar), .br(br), .nz_a(za), .nz_b(zb));
  rounding #(.N(M)) dut5 (.mag_a(sa), .mag_b(sb), .exp_a(xa), .exp_b(xb),
                          .ar(sar), .br(sbr), .nz_a(sza), .nz_b(szb));

  task automatic check(input bit ok, input string what, input int v);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s value=%0d", what, v);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      ma = N'(i); mb = N'(255 - i);
      sa = M'(i); sb = M'(31 - (i % 32));
      #1;
      check(ar == (N+1)'(ref_round(i, N)), "Ar", i);
      check(br == (N+1)'(ref_round(255 - i, N)), "Br", 255 - i);
      check(za == (i != 0) && zb == (i != 255), "nz", i);
      if (i != 0) check(ea == 4'(ref_exp(i, N)), "exp_a", i);
      if (i != 255) check(eb == 4'(ref_exp(255 - i, N)), "exp_b", 255 - i);
      if (i < 32) begin
        check(sar == (M+1)'(ref_round(i, M)), "5-bit Ar", i);
        check(sbr == (M+1)'(ref_round(31 - i, M)), "5-bit Br", 31 - i);
      end
      // Tie values 3 * 2^(p-2) must round up.
      for (int pp = 2; pp <= N; pp++)
        if (i == 3 * (1 << (pp - 2))) begin
          ties++;
          check(ar == (N+1)'(1 << pp), "tie rounds up", i);
        end
    end
    check(ties == N - 1, "tie count", ties);
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
