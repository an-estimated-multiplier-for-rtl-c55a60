// roba_mult_tb: exhaustive check of the rounding-based approximate
// multiplier for all 8-bit operand pairs, signed and unsigned, and a 5-bit
// signed instance. The expected product Ar*B + Br*A - Ar*Br and the signed
// rounding errors come from tb_ref_pkg. Known values: 18 x 28 gives 512
// (exact 504), 40 x 30 gives 1216 (exact 1200).
module roba_mult_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [7:0]  a, b, ras, rbs, rau, rbu;
  logic [15:0] ps, pu;
  logic [4:0]  a5, b5, ra5, rb5;
  logic [9:0]  p5;

  roba_mult #(.N(8), .SIGNED(1'b1)) dut_s (.a(a), .b(b), .p(ps), .res_a(ras), .res_b(rbs));
  roba_mult #(.N(8), .SIGNED(1'b0)) dut_u (.a(a), .b(b), .p(pu), .res_a(rau), .res_b(rbu));
  roba_mult #(.N(5), .SIGNED(1'b1)) dut_5 (.a(a5), .b(b5), .p(p5), .res_a(ra5), .res_b(rb5));

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
        longint sa, sb;
        a = 8'(i); b = 8'(j);
        a5 = 5'(i); b5 = 5'(j);
        #1;
        sa = sval(i, 8, 1); sb = sval(j, 8, 1);
        check(ps == 16'(ref_roba(sa, sb, 8)), "signed product");
        check(ras == 8'(ref_err(sa, 8)) && rbs == 8'(ref_err(sb, 8)), "signed errors");
        check(pu == 16'(ref_roba(i, j, 8)), "unsigned product");
        check(rau == 8'(ref_err(i, 8)) && rbu == 8'(ref_err(j, 8)), "unsigned errors");
        if (i < 32 && j < 32)
          check(p5 == 10'(ref_roba(sval(i, 5, 1), sval(j, 5, 1), 5)), "5-bit product");
      end
    end
    a = 8'd18; b = 8'd28; #1; check(pu == 16'd512 && ps == 16'd512, "18 x 28");
    a = 8'd40; b = 8'd30; #1; check(pu == 16'd1216, "40 x 30");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
