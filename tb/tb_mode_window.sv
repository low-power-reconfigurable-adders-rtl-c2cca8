// tb_mode_window: checks the 1-, 2- and 4-bit window mode expansion for
// all 4-bit and 8-bit packed modes and for random 16-bit modes.
module tb_mode_window;
  import vara_pkg::*;
  window_e window;
  logic [15:0] mode_in, mode_out, exp_out;
  int checks = 0, failures = 0;

  mode_window dut (.window(window), .mode_in(mode_in), .mode_out(mode_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    #1;
    checks++;
    if (mode_out !== exp_out) begin
      failures++;
      $display("FAIL %s in=%h got %h exp %h", what, mode_in, mode_out, exp_out);
    end
  endtask

  initial begin
    window = WIN_4BIT;
    for (int m = 0; m < 16; m++) begin
      mode_in = 16'($urandom) & 16'hFFF0 | 16'(m);
      exp_out = {{4{m[3]}}, {4{m[2]}}, {4{m[1]}}, {4{m[0]}}};
      check("4-bit");
    end
    // examples named for low / medium / high / even resolution images
    mode_in = 16'h0003; exp_out = 16'h00FF; check("4-bit 0011");
    mode_in = 16'h0006; exp_out = 16'h0FF0; check("4-bit 0110");
    mode_in = 16'h000C; exp_out = 16'hFF00; check("4-bit 1100");
    window = WIN_2BIT;
    for (int m = 0; m < 256; m++) begin
      mode_in = 16'($urandom) & 16'hFF00 | 16'(m);
      for (int j = 0; j < 8; j++) exp_out[2*j +: 2] = {2{m[j]}};
      check("2-bit");
    end
    window = WIN_1BIT;
    for (int i = 0; i < 200; i++) begin
      mode_in = 16'($urandom);
      exp_out = mode_in;
      check("1-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
