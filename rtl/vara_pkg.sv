// vara_pkg: constants and types shared by the variable accuracy
// reconfigurable adders (VARA1..VARA7).
//
// The 16-bit adders are carry select adders built of four 4-bit blocks.
// Each nibble is either "static" (conventional full adders, always exact)
// or "dynamic" (reconfigurable full adders, one mode bit per bit position).
// dyn_nibbles() returns, for a variant number 1..7, which nibbles are
// dynamic (bit k set = nibble k, bits 4k+3..4k, is dynamic). The seven
// splits follow the published design: VARA1..3 put 4/8/12 dynamic bits at
// the least significant end, VARA4 is dynamic throughout, VARA5..7 put
// 12/8/4 dynamic bits at the most significant end.
// The window encoding is this design's own choice.
package vara_pkg;

  localparam int unsigned WIDTH     = 16;  // operand width
  localparam int unsigned BLK       = 4;   // carry select block width
  localparam int unsigned NBLK      = WIDTH / BLK;
  localparam int unsigned NVARIANTS = 7;

  // Mode window methods for VARA4: one mode bit steers 1, 2 or 4 bits.
  typedef enum logic [1:0] {
    WIN_1BIT = 2'd0,  // 16 mode bits, 65536 configurations
    WIN_2BIT = 2'd1,  // 8 mode bits, 256 configurations
    WIN_4BIT = 2'd2   // 4 mode bits, 16 configurations
  } window_e;

  // Dynamic-nibble mask of variant VARAn.
  function automatic logic [NBLK-1:0] dyn_nibbles(input int unsigned variant);
    case (variant)
      1:       return 4'b0001;
      2:       return 4'b0011;
      3:       return 4'b0111;
      4:       return 4'b1111;
      5:       return 4'b1110;
      6:       return 4'b1100;
      7:       return 4'b1000;
      default: return 4'b0000;
    endcase
  endfunction

  // Per-bit mask of the bits a variant's mode input actually steers.
  function automatic logic [WIDTH-1:0] dyn_bits(input int unsigned variant);
    logic [NBLK-1:0] n;
    logic [WIDTH-1:0] m;
    n = dyn_nibbles(variant);
    for (int k = 0; k < int'(NBLK); k++) m[k*BLK +: BLK] = {BLK{n[k]}};
    return m;
  endfunction

endpackage
