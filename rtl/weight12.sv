// weight12: number of ones in a 12-bit word (0..12) as a 4-bit count.
//
// Built as the weight unit of the extended Golay encoder: four full adders
// each reduce three input bits to a 2-bit count, two 2-bit adders sum the
// counts in pairs to 3 bits, and a 3-bit adder produces the 4-bit weight.
// The tree structure follows the encoder's weight-unit drawing; the exact
// bit grouping (bits [2:0], [5:3], [8:6], [11:9]) is this design's choice.
// Purely combinational.
module weight12 (
  input  logic [11:0] din,
  output logic [3:0]  weight
);
  logic [1:0] fa [4];
  logic [2:0] s2 [2];

  for (genvar g = 0; g < 4; g++) begin : g_fa
    logic a, b, c;
    assign {a, b, c} = din[3*g +: 3];
    // full adder: sum and carry of three bits
    assign fa[g] = {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  end

  // two-bit adders
  assign s2[0] = {1'b0, fa[0]} + {1'b0, fa[1]};
  assign s2[1] = {1'b0, fa[2]} + {1'b0, fa[3]};
  // three-bit adder
  assign weight = {1'b0, s2[0]} + {1'b0, s2[1]};
endmodule
