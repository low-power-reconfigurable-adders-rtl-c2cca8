// tb_mux10to5: checks the carry select multiplexer for random data and
// both select values.
module tb_mux10to5;
  logic [3:0] sum0, sum1, sum;
  logic cout0, cout1, sel, cout;
  int checks = 0, failures = 0;

  mux10to5 dut (.sum0(sum0), .cout0(cout0), .sum1(sum1), .cout1(cout1),
                .sel(sel), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      {sum0, cout0, sum1, cout1} = 10'($urandom);
      sel = i[0];
      #1;
      checks++;
      if ({cout, sum} !== (sel ? {cout1, sum1} : {cout0, sum0})) begin
        failures++;
        $display("FAIL sel=%b got %b", sel, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
