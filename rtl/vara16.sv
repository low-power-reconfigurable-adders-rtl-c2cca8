// vara16: 16-bit variable accuracy reconfigurable adder (VARA1..VARA7).
//
// Structure: a carry select adder of four 4-bit blocks. Block 0 (bits 3:0)
// is one ripple adder with carry in 0. Blocks 1..3 each hold two ripple
// adders, one with carry in 0 and one with carry in 1, and a 10:5
// multiplexer picks the pair of sum and carry selected by the carry out
// of the block below (C4, C8, C12); the last multiplexer gives cout.
//
// VARIANT (1..7) decides which blocks are dynamic: a dynamic block uses
// reconfigurable full adders, and bit i of it is exact when mode[i]=1 and
// approximate when mode[i]=0; a static block uses conventional full
// adders and ignores its mode bits. Both ripple adders of a dynamic block
// receive the same mode nibble. The mode bits keep their bit positions:
// VARA1 reads mode[3:0], VARA7 reads mode[15:12], VARA4 all of mode.
// With every steering mode bit at 1 the adder is an exact 16-bit carry
// select adder. VARIANT=4 (all dynamic) is the default.
//
// There is no carry input (block 0 carries in 0), as in the published
// block diagrams. Purely combinational, no clock.
module vara16
  import vara_pkg::*;
#(
  parameter int unsigned VARIANT = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] mode,  // 1 = exact bit, 0 = approximate bit
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam logic [NBLK-1:0] DYN = dyn_nibbles(VARIANT);

  // Carry into each block: c[0] = 0, c[1] = C4, c[2] = C8, c[3] = C12,
  // c[4] = carry out.
  logic [NBLK:0] c;
  assign c[0] = 1'b0;
  assign cout = c[NBLK];

  // Block 0: single ripple adder (4BIT_RCA1).
  rca4 #(.RECONF(DYN[0])) u_rca1 (
    .a(a[3:0]), .b(b[3:0]), .cin(1'b0), .mode(mode[3:0]),
    .sum(sum[3:0]), .cout(c[1])
  );

  // Blocks 1..3: precomputed ripple adder pair and 10:5 multiplexer.
  for (genvar k = 1; k < int'(NBLK); k++) begin : g_blk
    logic [BLK-1:0] s0, s1;
    logic           co0, co1;

    rca4 #(.RECONF(DYN[k])) u_rca_c0 (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .cin(1'b0),
      .mode(mode[k*BLK +: BLK]), .sum(s0), .cout(co0)
    );
    rca4 #(.RECONF(DYN[k])) u_rca_c1 (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .cin(1'b1),
      .mode(mode[k*BLK +: BLK]), .sum(s1), .cout(co1)
    );
    mux10to5 u_mux (
      .sum0(s0), .cout0(co0), .sum1(s1), .cout1(co1), .sel(c[k]),
      .sum(sum[k*BLK +: BLK]), .cout(c[k+1])
    );
  end

  initial begin
    assert (VARIANT >= 1 && VARIANT <= NVARIANTS)
      else $error("vara16: VARIANT must be 1..7");
  end

endmodule
