// shifter_tb: random and exhaustive-amount checks of the barrel shifter in
// the widths the 8-bit multiplier uses (8 -> 17 bits, 4-bit amount), and of
// the zero input.
module shifter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [7:0]  din;
  logic [3:0]  amt;
  logic        zero;
  logic [16:0] dout;

  shifter #(.DW(8), .SW(4), .OW(17)) dut (.din(din), .amt(amt), .zero(zero), .dout(dout));

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint exp_v;
      din  = 8'($urandom);
      amt  = 4'(n % 16);
      zero = (n % 7) == 3;
      #1;
      exp_v = zero ? 0 : ((longint'(din) * (longint'(1) << amt)) % (longint'(1) << 17));
      checks++;
      if (longint'(dout) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL din=%0d amt=%0d zero=%0d got %0d want %0d",
                                    din, amt, zero, dout, exp_v);
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
