// present_player: the pLayer bit permutation of PRESENT.
//
// Bit i of the state moves to bit P(i) = 16*(i mod 4) + (i div 4), which is
// the closed form of the 64-entry permutation table (bit 63 stays in place).
// Pure wiring.
module present_player (
  input  logic [63:0] d_i,
  output logic [63:0] d_o
);

  always_comb begin
    for (int i = 0; i < 64; i++) d_o[16*(i % 4) + i/4] = d_i[i];
  end

endmodule
