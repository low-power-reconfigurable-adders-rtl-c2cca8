// mux10to5: carry select multiplexer of one 4-bit block.
//
// Takes the 4-bit sum and carry out of the block's two precomputed ripple
// adders (carry in 0 and carry in 1): ten inputs. The carry coming from
// the block below selects one set: five outputs. It is five 2:1
// multiplexers sharing one select, as in the published gate count
// (5 x 2:1 multiplexer per 10:5 multiplexer). Purely combinational.
module mux10to5 (
  input  logic [3:0] sum0,   // block sum with carry in 0
  input  logic       cout0,  // block carry out with carry in 0
  input  logic [3:0] sum1,   // block sum with carry in 1
  input  logic       cout1,  // block carry out with carry in 1
  input  logic       sel,    // carry from the block below
  output logic [3:0] sum,
  output logic       cout
);

  for (genvar i = 0; i < 4; i++) begin : g_mux
    assign sum[i] = sel ? sum1[i] : sum0[i];
  end
  assign cout = sel ? cout1 : cout0;

endmodule
