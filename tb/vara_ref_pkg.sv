// vara_ref_pkg: reference models used by the testbenches.
//
// The models describe the adders arithmetically, not by their gates:
// an approximate bit behaves like an exact full adder except that the
// input pattern a=0, b=1, carry-in=1 gives carry 0 and sum 1 (the single
// wrong row of the reconfigurable full adder truth table). An adder of
// such bits is evaluated by rippling the carry from bit 0.
package vara_ref_pkg;

  // One bit: returns {carry, sum}.
  function automatic logic [1:0] ref_bit(input logic a, b, c, exact);
    int unsigned t;
    t = int'(a) + int'(b) + int'(c);
    if (!exact && !a && b && c) return 2'b01;
    return {t >= 2, t[0]};
  endfunction

  // N-bit ripple of reference bits with carry in cin; exact_bits[i]=1
  // makes bit i exact. Returns {cout, sum}.
  function automatic logic [16:0] ref_add16(input logic [15:0] a, b,
                                            input logic [15:0] exact_bits);
    logic c;
    logic [1:0] r;
    logic [15:0] s;
    c = 1'b0;
    for (int i = 0; i < 16; i++) begin
      r = ref_bit(a[i], b[i], c, exact_bits[i]);
      s[i] = r[0];
      c = r[1];
    end
    return {c, s};
  endfunction

  // Bits of the mode input that a VARAn adder actually uses.
  function automatic logic [15:0] ref_dyn_bits(input int variant);
    case (variant)
      1: return 16'h000F;
      2: return 16'h00FF;
      3: return 16'h0FFF;
      4: return 16'hFFFF;
      5: return 16'hFFF0;
      6: return 16'hFF00;
      7: return 16'hF000;
      default: return 16'h0000;
    endcase
  endfunction

  // Result of VARAn for a given mode: static bits are always exact.
  function automatic logic [16:0] ref_vara(input int variant,
                                           input logic [15:0] a, b, mode);
    return ref_add16(a, b, mode | ~ref_dyn_bits(variant));
  endfunction

endpackage
