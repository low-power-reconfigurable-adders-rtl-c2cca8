// tb_vara_top: end-to-end test of the seven adders at their default
// sizes. Random operand pairs are applied with a mix of all-exact, random
// and partly approximate modes, and VARA4 is driven through all three
// window methods. Every output is compared with the reference model.
// The test also counts how often each mechanism of the design occurred
// and fails if one never did: exact (all-ones) operation, an approximate
// result that differs from a + b, mode bits at static positions being
// ignored, each window method, each block carry (C4, C8, C12) selecting
// the carry-in-1 adder, and a carry out.
module tb_vara_top;
  import vara_pkg::*;
  import vara_ref_pkg::*;

  logic [15:0] a, b;
  logic [15:0] mode [7];
  window_e     win;
  logic [15:0] sum  [7];
  logic        cout [7];
  int checks = 0, failures = 0;

  int n_exact [7];
  int n_approx_err [7];
  int n_static_ignored [7];
  int n_window [3];
  int n_blk_carry [4];
  int n_cout;

  vara_top dut (.a(a), .b(b), .mode(mode), .vara4_window(win),
                .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expand(input window_e w, input logic [15:0] m);
    logic [15:0] r;
    for (int i = 0; i < 16; i++)
      r[i] = (w == WIN_4BIT) ? m[i/4] : (w == WIN_2BIT) ? m[i/2] : m[i];
    return r;
  endfunction

  task automatic check_all();
    logic [16:0] e, exact;
    logic [15:0] m;
    logic        c;
    logic [1:0]  r;
    #1;
    exact = 17'(a) + 17'(b);
    for (int v = 0; v < 7; v++) begin
      m = (v == 3) ? expand(win, mode[3]) : mode[v];
      e = ref_vara(v + 1, a, b, m);
      checks++;
      if ({cout[v], sum[v]} !== e) begin
        failures++;
        if (failures < 20)
          $display("FAIL VARA%0d a=%h b=%h mode=%h win=%0d got %h exp %h",
                   v + 1, a, b, mode[v], win, {cout[v], sum[v]}, e);
      end
      if ((m | ~ref_dyn_bits(v + 1)) == 16'hFFFF) begin
        n_exact[v]++;
        checks++;
        if ({cout[v], sum[v]} !== exact) failures++;
      end
      if ({cout[v], sum[v]} != exact) n_approx_err[v]++;
    end
    if (cout[3]) n_cout++;
    // block carries of VARA4
    m = expand(win, mode[3]);
    c = 1'b0;
    for (int i = 0; i < 16; i++) begin
      if (i % 4 == 0 && c) n_blk_carry[i/4]++;
      r = ref_bit(a[i], b[i], c, m[i]);
      c = r[1];
    end
    n_window[int'(win)]++;
  endtask

  // Clearing the mode bits at static positions must not change a result.
  task automatic check_static();
    logic [15:0] keep_sum [7];
    logic        keep_cout [7];
    for (int v = 0; v < 7; v++) begin
      keep_sum[v] = sum[v];
      keep_cout[v] = cout[v];
    end
    for (int v = 0; v < 7; v++)
      if (v != 3) mode[v] = mode[v] & ref_dyn_bits(v + 1);
    #1;
    for (int v = 0; v < 7; v++) begin
      if (v == 3) continue;
      checks++;
      if (sum[v] !== keep_sum[v] || cout[v] !== keep_cout[v]) begin
        failures++;
        $display("FAIL VARA%0d depends on static mode bits", v + 1);
      end else if (ref_dyn_bits(v + 1) != 16'hFFFF) n_static_ignored[v]++;
    end
  endtask

  initial begin
    win = WIN_1BIT;
    for (int i = 0; i < 30000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      win = window_e'(i % 3);
      for (int v = 0; v < 7; v++)
        case (i % 5)
          0: mode[v] = 16'hFFFF;
          1: mode[v] = 16'($urandom);
          2: mode[v] = 16'hFFFF << (i % 17);
          3: mode[v] = 16'h0000;
          default: mode[v] = ~(16'hFFFF << (i % 17));
        endcase
      check_all();
      check_static();
    end

    for (int v = 0; v < 7; v++) begin
      $display("VARA%0d: exact-mode runs %0d, approximate results %0d, static mode ignored %0d",
               v + 1, n_exact[v], n_approx_err[v], n_static_ignored[v]);
      checks += 2;
      if (n_exact[v] == 0) failures++;
      if (n_approx_err[v] == 0) failures++;
      if (v != 3) begin
        checks++;
        if (n_static_ignored[v] == 0) failures++;
      end
    end
    $display("windows 1/2/4-bit: %0d %0d %0d; VARA4 block carries C4 %0d C8 %0d C12 %0d; cout %0d",
             n_window[0], n_window[1], n_window[2],
             n_blk_carry[1], n_blk_carry[2], n_blk_carry[3], n_cout);
    for (int w = 0; w < 3; w++) begin
      checks++;
      if (n_window[w] == 0) failures++;
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (n_blk_carry[k] == 0) failures++;
    end
    checks++;
    if (n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
