// mroba_top_tb: end-to-end test of the multiplier and its accumulator at the
// default size (8-bit signed operands, 16-bit product, 24-bit accumulator).
//
// Phase 1 applies every one of the 65536 operand pairs, one per clock. Each
// time it checks the exact product p against x*y, p_approx against the
// rounding-based formula Ar*B + Br*A - Ar*Br, and the accumulator against a
// model (random mac_en, occasional mac_clr). Phase 2 accumulates the largest
// product (-128 x -128) until the 24-bit accumulator overflows, then clears.
// Every mechanism is counted and must occur at least once: rounding down,
// rounding up, a tie 3 * 2^(p-2) rounded up, a zero operand, a negative
// product, every number of busy correction stages from 1 to 4, an
// accumulate, a hold, a clear and an overflow.
module mroba_top_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic        rst_n, mac_clr, mac_en, ovf;
  logic [7:0]  x, y;
  logic [15:0] p, p_approx;
  logic [4:0]  active;
  logic [23:0] acc;

  mroba_top dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .p(p), .p_approx(p_approx),
    .active(active), .mac_clr(mac_clr), .mac_en(mac_en), .acc(acc), .ovf(ovf));

  longint model;
  bit     movf;
  int n_down = 0, n_up = 0, n_tie = 0, n_zero = 0, n_neg = 0;
  int n_acc = 0, n_hold = 0, n_clr = 0, n_ovf = 0;
  int n_depth [6];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d cycle %0d", what, x, y, cycles);
    end
  endtask

  task automatic count_round(input longint v);
    longint m, r;
    m = (v < 0) ? -v : v;
    if (m == 0) begin n_zero++; return; end
    r = ref_round(m, 8);
    if (r > m) n_up++;
    if (r < m) n_down++;
    for (int pp = 2; pp <= 8; pp++) if (m == 3 * (longint'(1) << (pp - 2))) n_tie++;
  endtask

  // One clock: apply operands and controls, check after the edge.
  task automatic step(input logic [7:0] a, input logic [7:0] b, input bit en, input bit clr);
    longint sx, sy, s;
    @(negedge clk);
    x = a; y = b; mac_en = en; mac_clr = clr;
    #1;
    sx = sval(longint'(a), 8, 1);
    sy = sval(longint'(b), 8, 1);
    check(p == 16'(sx * sy), "exact product");
    check(p_approx == 16'(ref_roba(sx, sy, 8)), "approximate product");
    count_round(sx);
    count_round(sy);
    if (sx * sy < 0) n_neg++;
    n_depth[$countones(active)]++;
    @(posedge clk);
    #1;
    if (clr) begin
      model = 0; movf = 0; n_clr++;
    end else if (en) begin
      s = model + sx * sy;
      if (s > 8388607 || s < -8388608) movf = 1;
      if (s > 8388607)  s -= 16777216;
      if (s < -8388608) s += 16777216;
      model = s;
      n_acc++;
    end else begin
      n_hold++;
    end
    if (ovf) n_ovf++;
    check(acc == 24'(model), "accumulator");
    check(ovf == movf, "overflow flag");
  endtask

  initial begin
    foreach (n_depth[k]) n_depth[k] = 0;
    rst_n = 1'b0; mac_clr = 1'b0; mac_en = 1'b0; x = '0; y = '0;
    model = 0; movf = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(acc == 0 && !ovf, "reset");
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        step(8'(i), 8'(j), ($urandom % 5) != 0, ((i * 256 + j) % 4099) == 4098);
    for (int k = 0; k < 600; k++) step(8'h80, 8'h80, 1'b1, 1'b0);
    step(8'd3, 8'd5, 1'b0, 1'b1);
    check(acc == 0 && !ovf, "cleared after overflow");
    check(n_down > 0, "rounding down seen");
    check(n_up > 0, "rounding up seen");
    check(n_tie > 0, "tie seen");
    check(n_zero > 0, "zero operand seen");
    check(n_neg > 0, "negative product seen");
    for (int k = 1; k <= 4; k++) check(n_depth[k] > 0, "correction depth seen");
    check(n_acc > 0 && n_hold > 0 && n_clr > 0 && n_ovf > 0, "accumulator modes seen");
    $display("round down %0d, up %0d, tie %0d, zero %0d, negative %0d", n_down, n_up, n_tie, n_zero, n_neg);
    $display("busy stages 1..4: %0d %0d %0d %0d", n_depth[1], n_depth[2], n_depth[3], n_depth[4]);
    $display("accumulate %0d, hold %0d, clear %0d, overflow cycles %0d", n_acc, n_hold, n_clr, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
