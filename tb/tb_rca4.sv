// tb_rca4: exhaustive check of the 4-bit ripple adder in both builds.
// The reconfigurable build is checked for every a, b, carry in and mode
// (8192 cases) against the reference bit model; the conventional build
// against a + b + cin for every a, b, carry in and several modes.
module tb_rca4;
  import vara_ref_pkg::*;
  logic [3:0] a, b, mode, sum_r, sum_c;
  logic cin, cout_r, cout_c;
  int checks = 0, failures = 0;

  rca4 #(.RECONF(1'b1)) dut_r (.a(a), .b(b), .cin(cin), .mode(mode),
                               .sum(sum_r), .cout(cout_r));
  rca4 #(.RECONF(1'b0)) dut_c (.a(a), .b(b), .cin(cin), .mode(mode),
                               .sum(sum_c), .cout(cout_c));

  function automatic logic [4:0] ref4(input logic [3:0] x, y,
                                      input logic ci, input logic [3:0] m);
    logic c;
    logic [1:0] r;
    logic [3:0] s;
    c = ci;
    for (int i = 0; i < 4; i++) begin
      r = ref_bit(x[i], y[i], c, m[i]);
      s[i] = r[0];
      c = r[1];
    end
    return {c, s};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8192; v++) begin
      {mode, cin, a, b} = 13'(v);
      #1;
      checks++;
      if ({cout_r, sum_r} !== ref4(a, b, cin, mode)) begin
        failures++;
        if (failures < 10)
          $display("FAIL rcfa a=%h b=%h cin=%b mode=%b got %h exp %h",
                   a, b, cin, mode, {cout_r, sum_r}, ref4(a, b, cin, mode));
      end
      checks++;
      if (5'({cout_c, sum_c}) != 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cfa a=%h b=%h cin=%b got %h", a, b, cin, {cout_c, sum_c});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
