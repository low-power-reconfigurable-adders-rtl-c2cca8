// mode_window: mode configuration by window method for the all-dynamic
// adder (VARA4).
//
// The adder has one mode bit per bit position (16). To reduce the number
// of configuration bits, adjacent bit positions can share one mode bit:
//   WIN_1BIT: mode_out = mode_in (16 bits, 65536 configurations)
//   WIN_2BIT: mode_in[7:0], bit j steers bits 2j+1:2j (256 configurations)
//   WIN_4BIT: mode_in[3:0], bit j steers bits 4j+3:4j (16 configurations)
// Unused high bits of mode_in are ignored. The windows follow the
// published 1-, 2- and 4-bit window methods; the window encoding and the
// reserved code (treated as WIN_1BIT) are this design's choice.
// Purely combinational.
module mode_window
  import vara_pkg::*;
(
  input  window_e          window,
  input  logic [WIDTH-1:0] mode_in,
  output logic [WIDTH-1:0] mode_out
);

  always_comb begin
    unique case (window)
      WIN_2BIT:
        for (int i = 0; i < int'(WIDTH); i++) mode_out[i] = mode_in[i/2];
      WIN_4BIT:
        for (int i = 0; i < int'(WIDTH); i++) mode_out[i] = mode_in[i/4];
      default:
        mode_out = mode_in;
    endcase
  end

endmodule
