// mac_unit_tb: drives the accumulator with random signed 16-bit products
// and random enable/clear, and compares acc and the sticky overflow flag
// with a model kept in the testbench; also an unsigned 8-bit-accumulator
// instance that is made to overflow. acc must change one clock after an
// enabled product.
module mac_unit_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic        rst_n, clr, en;
  logic [15:0] prod;
  logic [23:0] acc;
  logic        ovf;
  logic [7:0]  acc_u;
  logic        ovf_u;

  mac_unit #(.PW(16), .ACCW(24), .SIGNED(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .prod(prod), .acc(acc), .ovf(ovf));
  mac_unit #(.PW(4), .ACCW(8), .SIGNED(1'b0)) dut_u (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .prod(prod[3:0]), .acc(acc_u), .ovf(ovf_u));

  longint model, model_u;
  bit     movf, movf_u;
  int     n_clr = 0, n_ovf = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; prod = '0;
    model = 0; model_u = 0; movf = 0; movf_u = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(acc == 0 && acc_u == 0 && !ovf && !ovf_u, "reset");
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      clr  = (n % 1500) == 1499 || ($urandom % 997) == 0;
      en   = ($urandom % 4) != 0;
      prod = (n % 500 < 250) ? 16'sh7fff - 16'($urandom % 8) : 16'($urandom);
      @(posedge clk);
      #1;
      if (clr) begin
        model = 0; movf = 0; model_u = 0; movf_u = 0; n_clr++;
      end else if (en) begin
        longint s;
        s = model + longint'($signed(prod));
        if (s > 8388607 || s < -8388608) movf = 1;
        model = s;
        if (model > 8388607)  model -= 16777216;
        if (model < -8388608) model += 16777216;
        model_u += longint'(prod[3:0]);
        if (model_u > 255) begin movf_u = 1; model_u -= 256; end
      end
      if (ovf) n_ovf++;
      check(acc == 24'(model), "signed acc");
      check(ovf == movf, "signed overflow flag");
      check(acc_u == 8'(model_u) && ovf_u == movf_u, "unsigned acc");
    end
    check(n_clr > 0 && n_ovf > 0, "clear and overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
