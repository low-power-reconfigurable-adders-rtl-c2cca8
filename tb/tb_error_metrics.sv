// tb_error_metrics: error metrics of the all-dynamic adder (VARA4) for
// the 29 mode configurations MC1..MC29: approximate bits grow from the
// least significant end (FFFF, FFFE, FFFC, ... 8000) and then exact bits
// shrink from the most significant end (7FFF, 3FFF, ... 0000).
// For each configuration SAMPLES random operand pairs are applied (the
// full 2^32 input space is too large to simulate) and the testbench
// reports
//   ER   error rate, share of wrong sums
//   MED  mean error distance |X - X'|
//   NMED MED / (2*(2^16-1))
//   MRED mean of |X - X'| / X over pairs with X > 0
//   CA   computational accuracy, (1 - MRED) * 100 %
// CA is compared with the published CA of each configuration, within a
// sampling tolerance. Every sum is also checked against the reference model, and MC1 and MC2
// (bit 0 has carry in 0, so an approximate bit 0 is still exact) must be
// error free.
module tb_error_metrics;
  import vara_ref_pkg::*;
  localparam int SAMPLES = 100000;
  // CA (%) of MC1..MC29 as published for the same mode configurations
  localparam real CA_PUB [29] = '{
    100.0, 100.0, 99.9998, 99.9998, 99.9997, 99.9946, 99.9888, 99.9774,
    99.9509, 99.9027, 99.8071, 99.6208, 99.3046, 98.6581, 97.4482,
    95.3078, 94.5929, 92.7466, 92.1329, 91.9340, 91.8746, 91.8552,
    91.8499, 91.8487, 91.8099, 91.8192, 91.8998, 91.8000, 91.7880};
  localparam real CA_TOL = 0.25;  // sampling tolerance, percentage points
  localparam int NMC = 29;

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

  function automatic logic [15:0] mc_mode(input int mc);
    if (mc <= 16) return 16'hFFFF << (mc - 1);  // MC1..MC16
    if (mc <= 28) return 16'hFFFF >> (mc - 16); // MC17..MC28
    return 16'h0000;                            // MC29
  endfunction

  initial begin
    $display("MC  mode  ER        MED         NMED        MRED        CA(%%)");
    for (int mc = 1; mc <= NMC; mc++) begin
      real sum_ed, sum_red, med, nmed, mred, er;
      int  n_err, n_red;
      sum_ed = 0.0; sum_red = 0.0; n_err = 0; n_red = 0;
      mode = mc_mode(mc);
      for (int i = 0; i < SAMPLES; i++) begin
        int unsigned x, xa, ed;
        a = 16'($urandom);
        b = 16'($urandom);
        #1;
        checks++;
        if ({cout, sum} !== ref_add16(a, b, mode)) begin
          failures++;
          if (failures < 10) $display("FAIL mc=%0d a=%h b=%h got %h", mc, a, b, {cout, sum});
        end
        x  = int'(a) + int'(b);
        xa = int'({cout, sum});
        ed = (x > xa) ? x - xa : xa - x;
        if (ed != 0) n_err++;
        sum_ed += real'(ed);
        if (x > 0) begin
          sum_red += real'(ed) / real'(x);
          n_red++;
        end
      end
      er   = real'(n_err) / real'(SAMPLES);
      med  = sum_ed / real'(SAMPLES);
      nmed = med / 131070.0;
      mred = sum_red / real'(n_red);
      $display("%2d  %h  %8.6f  %10.4e  %10.4e  %10.4e  %8.4f",
               mc, mode, er, med, nmed, mred, (1.0 - mred) * 100.0);
      checks++;
      if ((1.0 - mred) * 100.0 > CA_PUB[mc-1] + CA_TOL ||
          (1.0 - mred) * 100.0 < CA_PUB[mc-1] - CA_TOL) begin
        failures++;
        $display("FAIL MC%0d CA %8.4f far from published %8.4f", mc,
                 (1.0 - mred) * 100.0, CA_PUB[mc-1]);
      end
      if (mc <= 2) begin
        checks++;
        if (n_err != 0) failures++;
      end else if (mc == NMC) begin
        checks++;  // the all-approximate adder must make errors
        if (n_err == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
