// tb_rcfa: exhaustive check of the reconfigurable full adder against its
// truth table (all 8 input rows for Mode=0 and Mode=1). The expected
// values are written out as a table, independent of the cell's equations.
module tb_rcfa;
  logic a, b, c, mode, sum, carry;
  int checks = 0, failures = 0, errors_seen = 0;

  rcfa dut (.a(a), .b(b), .c(c), .mode(mode), .sum(sum), .carry(carry));

  // {carry, sum} per row abc = 000..111
  localparam logic [1:0] EXP_M0 [8] = '{2'b00, 2'b01, 2'b01, 2'b01,
                                        2'b01, 2'b10, 2'b10, 2'b11};
  localparam logic [1:0] EXP_M1 [8] = '{2'b00, 2'b01, 2'b01, 2'b10,
                                        2'b01, 2'b10, 2'b10, 2'b11};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int r = 0; r < 8; r++) begin
        {a, b, c} = 3'(r);
        mode = 1'(m);
        #1;
        checks++;
        if ({carry, sum} !== (m ? EXP_M1[r] : EXP_M0[r])) begin
          failures++;
          $display("FAIL mode=%0d abc=%03b got c=%b s=%b", m, r[2:0], carry, sum);
        end
        if (m == 1) begin
          checks++;
          if (int'({carry, sum}) != int'(a) + int'(b) + int'(c)) failures++;
        end
        if (m == 0 && int'({carry, sum}) != int'(a) + int'(b) + int'(c))
          errors_seen++;
      end
    end
    // exactly one wrong row out of eight in approximate mode
    checks++;
    if (errors_seen != 1) begin
      failures++;
      $display("FAIL approximate rows wrong: %0d, expected 1", errors_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
