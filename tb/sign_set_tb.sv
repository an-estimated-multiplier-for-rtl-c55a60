// sign_set_tb: checks that the sign-set block negates the 17-bit magnitude
// when the product is negative and cuts the result to 16 bits.
module sign_set_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [16:0] mag;
  logic        neg;
  logic [15:0] res;

  sign_set #(.IW(17), .OW(16)) dut (.mag(mag), .neg(neg), .res(res));

  initial begin
    for (int n = 0; n < 10000; n++) begin
      int v;
      mag = (n < 5) ? 17'(n) : 17'($urandom);
      neg = n[0];
      #1;
      v = neg ? -int'(mag) : int'(mag);
      checks++;
      if (res != 16'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%0d neg=%0d res=%h", mag, neg, res);
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
