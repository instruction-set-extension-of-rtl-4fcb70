// present_key_update: the KeyTransform of PRESENT with an 80-bit key.
//
// After the round key (bits 79:16) has been used, the key register is
//   1. rotated left by 61 bit positions,
//   2. its leftmost nibble (79:76) passed through the PRESENT S-box,
//   3. bits 19:15 XORed with the 5-bit round counter.
// The S-box is taken from present_sbox_layer (only the top nibble is used).
// Combinational.
module present_key_update (
  input  logic [79:0] key_i,
  input  logic [4:0]  round_counter,
  output logic [79:0] key_o
);

  logic [79:0] rot;
  logic [63:0] sb_in, sb_out;

  assign rot   = {key_i[18:0], key_i[79:19]};
  assign sb_in = {rot[79:76], 60'd0};

  present_sbox_layer u_sbox (.d_i(sb_in), .d_o(sb_out));

  always_comb begin
    key_o         = rot;
    key_o[79:76]  = sb_out[63:60];
    key_o[19:15]  = rot[19:15] ^ round_counter;
  end

endmodule
