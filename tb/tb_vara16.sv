// tb_vara16: checks the 16-bit carry select adder in all seven variants.
// The default instance (no parameters) is VARA4; the others set VARIANT.
// Every result is compared with the ripple reference model; directed
// cases check that all-ones modes give a + b, that bit 0 is always exact
// (it has carry in 0), and a hand-worked approximate result.
module tb_vara16;
  import vara_ref_pkg::*;
  logic [15:0] a, b, mode;
  logic [15:0] sum [7];
  logic        cout [7];
  int checks = 0, failures = 0;

  vara16 dut4 (.a(a), .b(b), .mode(mode), .sum(sum[3]), .cout(cout[3]));
  for (genvar v = 0; v < 7; v++) begin : g_v
    if (v != 3) begin : g_inst
      vara16 #(.VARIANT(v + 1)) dut (.a(a), .b(b), .mode(mode),
                                     .sum(sum[v]), .cout(cout[v]));
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [16:0] e;
    #1;
    for (int v = 0; v < 7; v++) begin
      e = ref_vara(v + 1, a, b, mode);
      checks++;
      if ({cout[v], sum[v]} !== e) begin
        failures++;
        if (failures < 20)
          $display("FAIL VARA%0d a=%h b=%h mode=%h got %h exp %h",
                   v + 1, a, b, mode, {cout[v], sum[v]}, e);
      end
    end
  endtask

  task automatic expect_sum(input int v, input logic [16:0] e);
    checks++;
    if ({cout[v], sum[v]} !== e) begin
      failures++;
      $display("FAIL directed VARA%0d a=%h b=%h mode=%h got %h exp %h",
               v + 1, a, b, mode, {cout[v], sum[v]}, e);
    end
  endtask

  initial begin
    // hand-worked: 1 + 3 with bit 1 approximate -> 2 instead of 4
    a = 16'h0001; b = 16'h0003; mode = 16'hFFFD; #1;
    expect_sum(3, 17'h00002);  // VARA4: bit 1 dynamic
    expect_sum(0, 17'h00002);  // VARA1: bit 1 dynamic
    expect_sum(6, 17'h00004);  // VARA7: bit 1 static
    expect_sum(4, 17'h00004);  // VARA5: bit 1 static
    // carry out of the top: exact with all ones
    a = 16'hFFFF; b = 16'h0001; mode = 16'hFFFF; #1;
    for (int v = 0; v < 7; v++) expect_sum(v, 17'h10000);
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      case (i % 4)
        0: mode = 16'hFFFF;
        1: mode = 16'($urandom);
        2: mode = 16'hFFFF << (i % 17);
        default: mode = 16'hFFFE;
      endcase
      check_all();
      if (mode == 16'hFFFF || mode == 16'hFFFE)
        for (int v = 0; v < 7; v++) expect_sum(v, 17'(a) + 17'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
