// mroba_mult_tb: exhaustive check that the modified multiplier returns the
// exact product for every 8-bit operand pair, signed and unsigned, and for a
// 6-bit signed instance; that p_approx is the plain rounding-based result;
// and the three operand pairs of the published simulation waveform
// (18 x 28 = 504, 20 x 28 = 560, 40 x 30 = 1200). It also records the
// deepest correction stage used and requires the last stage to be reached.
module mroba_mult_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [7:0]  x, y;
  logic [15:0] ps, pu, pas, pau;
  logic [4:0]  acts, actu;
  logic [5:0]  x6, y6;
  logic [11:0] p6, pa6;
  logic [3:0]  act6;
  int depth_u [6];
  int depth_s [6];

  mroba_mult #(.N(8), .SIGNED(1'b1)) dut_s (.x(x), .y(y), .p(ps), .p_approx(pas), .active(acts));
  mroba_mult #(.N(8), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .p(pu), .p_approx(pau), .active(actu));
  mroba_mult #(.N(6), .SIGNED(1'b1)) dut_6 (.x(x6), .y(y6), .p(p6), .p_approx(pa6), .active(act6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d", what, x, y);
    end
  endtask

  initial begin
    foreach (depth_u[k]) begin depth_u[k] = 0; depth_s[k] = 0; end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        longint sx, sy;
        x = 8'(i); y = 8'(j);
        x6 = 6'(i); y6 = 6'(j);
        #1;
        sx = sval(i, 8, 1); sy = sval(j, 8, 1);
        check(ps == 16'(sx * sy), "signed exact");
        check(pu == 16'(i * j), "unsigned exact");
        check(pas == 16'(ref_roba(sx, sy, 8)), "signed approx");
        check(pau == 16'(ref_roba(i, j, 8)), "unsigned approx");
        if (i < 64 && j < 64)
          check(p6 == 12'(sval(i, 6, 1) * sval(j, 6, 1)), "6-bit exact");
        depth_u[$countones(actu)]++;
        depth_s[$countones(acts)]++;
      end
    end
    check(depth_u[5] > 0, "unsigned needs all five stages");
    check(depth_s[4] > 0 && depth_s[5] == 0, "signed needs four stages");
    x = 8'd18; y = 8'd28; #1; check(pu == 16'd504 && ps == 16'd504, "waveform 18 x 28");
    x = 8'd20; y = 8'd28; #1; check(pu == 16'd560 && ps == 16'd560, "waveform 20 x 28");
    x = 8'd40; y = 8'd30; #1; check(pu == 16'd1200 && ps == 16'd1200, "waveform 40 x 30");
    for (int k = 0; k < 6; k++)
      $display("stages active %0d: unsigned %0d pairs, signed %0d pairs", k, depth_u[k], depth_s[k]);
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
