// cfa: conventional full adder (one bit), used in the static nibbles.
//
// Built from two half adders as described for the conventional cell:
//   SUM   = (A xor B) xor C
//   CARRY = (A xor B)*C + A*B
// Always exact; purely combinational.
module cfa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic p, g;  // first half adder: propagate and generate

  always_comb begin
    p     = a ^ b;
    g     = a & b;
    sum   = p ^ c;
    carry = (p & c) | g;
  end

endmodule
