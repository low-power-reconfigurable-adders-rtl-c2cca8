// rcfa: reconfigurable full adder (one bit).
//
// The carry avoids the XOR of a conventional full adder:
//   CARRY = A*(B+C) + Mode*(B*C)
// With Mode=1 this is the exact majority carry. With Mode=0 the B*C term
// is dropped, so the carry is wrong only for A=0,B=1,C=1 (carry 0 instead
// of 1). The sum is picked by a 2:1 multiplexer steered by the carry:
// carry=0 selects M0 = A+B+C, carry=1 selects M1 = A*B*C. For Mode=1
// this gives the exact sum; for Mode=0 the single wrong case gives sum 1,
// so the result is 1 instead of 2 (error distance one), and the other
// seven input combinations are exact (87.5 % pass rate).
// The shared AND-OR block (Oo = B+C, Ao = B*C), the gates feeding the
// multiplexer and the carry-selected multiplexer follow the published cell
// structure; the cell is purely combinational.
module rcfa (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic mode,   // 1 = accurate, 0 = approximate
  output logic sum,
  output logic carry
);

  logic oo, ao;  // AND-OR block outputs
  logic m0, m1;  // multiplexer data inputs

  always_comb begin
    oo    = b | c;
    ao    = b & c;
    carry = (a & oo) | (mode & ao);
    m0    = a | oo;
    m1    = a & ao;
    sum   = carry ? m1 : m0;
  end

endmodule
