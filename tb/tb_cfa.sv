// tb_cfa: exhaustive check of the conventional full adder against
// arithmetic addition of its three input bits.
module tb_cfa;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  cfa dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {a, b, c} = 3'(r);
      #1;
      checks++;
      if (int'({carry, sum}) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL abc=%03b got c=%b s=%b", r[2:0], carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
