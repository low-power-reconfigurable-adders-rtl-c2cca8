// rca4: 4-bit ripple carry adder, the building block of the carry select
// adders.
//
// RECONF=1 builds it from reconfigurable full adders (rcfa): bit i is exact
// when mode[i]=1 and approximate when mode[i]=0. RECONF=0 builds it from
// conventional full adders (cfa) and mode is not used. The carry ripples
// from bit 0 to bit 3; cout is the carry out of bit 3. Purely
// combinational.
module rca4 #(
  parameter bit RECONF = 1'b1
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  input  logic [3:0] mode,   // per-bit accuracy, used only when RECONF=1
  output logic [3:0] sum,
  output logic       cout
);

  logic [4:0] c;
  assign c[0] = cin;
  assign cout = c[4];

  for (genvar i = 0; i < 4; i++) begin : g_bit
    if (RECONF) begin : g_rcfa
      rcfa u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .mode(mode[i]),
                 .sum(sum[i]), .carry(c[i+1]));
    end else begin : g_cfa
      cfa  u_fa (.a(a[i]), .b(b[i]), .c(c[i]),
                 .sum(sum[i]), .carry(c[i+1]));
    end
  end

endmodule
