// tb_blend_psnr: image blending g = (1 - alpha) * f1 + alpha * f2 with the
// addition done by the all-dynamic adder (VARA4), for alpha = 0.25, 0.5
// and 0.75 and the mode cases 1..16 in which the approximate bits grow
// from the least significant end (FFFF, FFFE, ... 8000, 0000).
// Two 64 x 64 8-bit test images are generated (a gradient and a
// checkered texture). Each pixel is weighted in 16-bit fixed point
// (pixel * round(weight * 256), at most 65280), and the two weighted
// pixels are added by the adder; the blended image therefore has a
// 16-bit range and PSNR uses Vmax = 65535. The weighting is exact, only
// the addition is approximate. The testbench reports MSE and PSNR for
// every case, checks every sum against the reference model, and checks
// that case 1 (all exact) reproduces the exact blend.
module tb_blend_psnr;
  import vara_ref_pkg::*;
  localparam int SIDE = 64;
  localparam int NCASE = 17;

  logic [15:0] a, b, mode, sum;
  logic        cout;
  int checks = 0, failures = 0;

  vara16 dut (.a(a), .b(b), .mode(mode), .sum(sum), .cout(cout));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int f1(input int x, input int y);
    return (x * 4 + y) % 256;                        // diagonal gradient
  endfunction
  function automatic int f2(input int x, input int y);
    return (((x / 8) + (y / 8)) % 2) ? 200 - y : 40 + x;  // checkered texture
  endfunction

  function automatic string fmt(input real p);
    return (p == 999.0) ? "exact" : $sformatf("%0.2f", p);
  endfunction

  initial begin
    int w2 [3] = '{64, 128, 192};  // alpha * 256 for 0.25, 0.5, 0.75
    $display("case  mode  alpha=0.25 PSNR  alpha=0.50 PSNR  alpha=0.75 PSNR (dB)");
    for (int cs = 1; cs <= NCASE; cs++) begin
      real psnr [3];
      mode = (cs == NCASE) ? 16'h0000 : 16'hFFFF << (cs - 1);
      for (int k = 0; k < 3; k++) begin
        real se, mse;
        se = 0.0;
        for (int y = 0; y < SIDE; y++) begin
          for (int x = 0; x < SIDE; x++) begin
            int unsigned exact, got;
            a = 16'(f1(x, y) * (256 - w2[k]));
            b = 16'(f2(x, y) * w2[k]);
            #1;
            exact = int'(a) + int'(b);
            got = int'({cout, sum});
            checks++;
            if ({cout, sum} !== ref_add16(a, b, mode)) begin
              failures++;
              if (failures < 10) $display("FAIL case %0d a=%h b=%h got %h", cs, a, b, got);
            end
            se += (real'(exact) - real'(got)) ** 2;
          end
        end
        mse = se / real'(SIDE * SIDE);
        psnr[k] = (mse == 0.0) ? 999.0 : 20.0 * $log10(65535.0 / $sqrt(mse));
        if (cs == 1) begin
          checks++;
          if (mse != 0.0) failures++;
        end
      end
      $display("%4d  %h  %15s  %15s  %15s", cs, mode,
               fmt(psnr[0]), fmt(psnr[1]), fmt(psnr[2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
