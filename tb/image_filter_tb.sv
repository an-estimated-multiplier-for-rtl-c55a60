// image_filter_tb: runs the two image-processing workloads the multiplier is
// meant for, 3x3 smoothing and 3x3 sharpening, through mroba_top's
// multiply-accumulate path on a generated 16x16 8-bit grey-scale image.
//
// Kernels: smoothing (Gaussian) 1 2 1 / 2 4 2 / 1 2 1, sharpening
// 0 -1 0 / -1 5 -1 / 0 -1 0. Each output pixel takes one clear cycle and
// nine accumulate cycles (one product per cycle); the accumulated value is
// compared with the convolution computed here with integer arithmetic, and
// the cycle count per pixel is checked. 8-bit pixels (0..255) next to
// negative coefficients need 9-bit signed operands, so the top is built
// with N = 9. Smoothing coefficients are powers of two, which the rounding
// stage already represents exactly. The testbench also reports how far the plain rounding-based
// products (p_approx) would have taken each filtered pixel.
module image_filter_tb;
  localparam int N = 9;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic           rst_n, mac_clr, mac_en, ovf;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p, p_approx;
  logic [4:0]     active;
  logic [2*N+7:0] acc;

  mroba_top #(.N(N), .SIGNED(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .p(p), .p_approx(p_approx),
    .active(active), .mac_clr(mac_clr), .mac_en(mac_en), .acc(acc), .ovf(ovf));

  int img [W][W];
  int kern [2][3][3];
  longint approx_err_sum [2];
  int     approx_err_max [2];

  function automatic longint sx(input logic [2*N-1:0] v);
    return longint'($signed(v));
  endfunction

  function automatic longint sacc(input logic [2*N+7:0] v);
    return longint'($signed(v));
  endfunction

  initial begin
    kern[0] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    kern[1] = '{'{0, -1, 0}, '{-1, 5, -1}, '{0, -1, 0}};
    for (int r = 0; r < W; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (r * 16 + c * 9 + int'($urandom % 40)) % 256;
    rst_n = 1'b0; mac_clr = 1'b0; mac_en = 1'b0; x = '0; y = '0;
    approx_err_sum = '{0, 0};
    approx_err_max = '{0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 1; r < W - 1; r++) begin
        for (int c = 1; c < W - 1; c++) begin
          longint want, approx;
          int start;
          want = 0; approx = 0;
          @(negedge clk);
          mac_clr = 1'b1; mac_en = 1'b0;
          start = cycles;
          for (int i = 0; i < 3; i++) begin
            for (int j = 0; j < 3; j++) begin
              @(negedge clk);
              mac_clr = 1'b0; mac_en = 1'b1;
              x = N'(img[r+i-1][c+j-1]);
              y = N'(kern[f][i][j]);
              #1;
              want   += longint'(img[r+i-1][c+j-1]) * kern[f][i][j];
              approx += sx(p_approx);
            end
          end
          @(negedge clk);
          mac_en = 1'b0;
          checks++;
          if (sacc(acc) != want || ovf) begin
            failures++;
            if (failures < 10) $display("FAIL filter %0d pixel (%0d,%0d): got %0d want %0d", f, r, c, sacc(acc), want);
          end
          checks++;
          if (cycles - start != 10) begin
            failures++;
            if (failures < 10) $display("FAIL cycles per pixel %0d", cycles - start);
          end
          approx_err_sum[f] += (approx > want) ? approx - want : want - approx;
          if (((approx > want) ? approx - want : want - approx) > approx_err_max[f])
            approx_err_max[f] = int'((approx > want) ? approx - want : want - approx);
        end
      end
    end
    $display("smoothing: exact; rounding-only products would give total |error| %0d over 196 pixels, max %0d",
             approx_err_sum[0], approx_err_max[0]);
    $display("sharpening: exact; rounding-only products would give total |error| %0d over 196 pixels, max %0d",
             approx_err_sum[1], approx_err_max[1]);
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
