// present_sbox_layer: the sBoxLayer of the PRESENT block cipher.
//
// The 64-bit state is cut into sixteen 4-bit words, each passed through its
// own copy of the PRESENT S-box
//   x    : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S[x] : C 5 6 B 9 0 A D 3 E F 8 4 7 1 2
// Combinational.  The S-box is also used by the key update (present_key_update).
module present_sbox_layer (
  input  logic [63:0] d_i,
  output logic [63:0] d_o
);

  function automatic logic [3:0] sbox4(input logic [3:0] x);
    case (x)
      4'h0: return 4'hC;  4'h1: return 4'h5;  4'h2: return 4'h6;  4'h3: return 4'hB;
      4'h4: return 4'h9;  4'h5: return 4'h0;  4'h6: return 4'hA;  4'h7: return 4'hD;
      4'h8: return 4'h3;  4'h9: return 4'hE;  4'hA: return 4'hF;  4'hB: return 4'h8;
      4'hC: return 4'h4;  4'hD: return 4'h7;  4'hE: return 4'h1;  default: return 4'h2;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < 16; i++) d_o[4*i +: 4] = sbox4(d_i[4*i +: 4]);
  end

endmodule
