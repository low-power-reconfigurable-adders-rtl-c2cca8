// vara_top: the seven 16-bit variable accuracy reconfigurable adders side
// by side on one operand pair.
//
// Index v of the mode and result arrays belongs to VARA(v+1). Each adder
// reads only the mode bits at the positions of its dynamic nibbles (see
// vara16). VARA4, the fully dynamic adder, takes its 16 per-bit modes
// through a window expander, so it can be configured with 16, 8 or 4 mode
// bits (vara4_window, with mode[3] holding the packed mode bits). The
// other adders take mode[v] directly.
//
// With all used mode bits at 1 every output equals a + b. The design is
// combinational: results follow the inputs after the adder delay. The
// mode inputs are where an external accuracy controller would connect.
module vara_top
  import vara_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] mode [NVARIANTS],
  input  window_e          vara4_window,
  output logic [WIDTH-1:0] sum  [NVARIANTS],
  output logic             cout [NVARIANTS]
);

  logic [WIDTH-1:0] vara4_mode;

  mode_window u_window (
    .window(vara4_window), .mode_in(mode[3]), .mode_out(vara4_mode)
  );

  for (genvar v = 0; v < int'(NVARIANTS); v++) begin : g_vara
    vara16 #(.VARIANT(v + 1)) u_vara (
      .a(a), .b(b),
      .mode((v == 3) ? vara4_mode : mode[v]),
      .sum(sum[v]), .cout(cout[v])
    );
  end

endmodule
