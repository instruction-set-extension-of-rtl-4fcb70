// aes_mixcolumn: datapath of the MixColumn instruction (new_ins_3, op3 = 0x1D).
//
// Multiplies one state column (row 0 in bits 31:24) by the fixed AES matrix
//   02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02
// over GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1.  Multiplication by
// 02 is the xtime shift-and-conditional-XOR, by 03 is xtime plus the byte
// itself, so the whole column is four xtime blocks and an XOR network.
// Combinational.
module aes_mixcolumn (
  input  logic [31:0] col_i,
  output logic [31:0] col_o
);

  function automatic logic [7:0] xtime(input logic [7:0] v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

  logic [7:0] s [4];
  logic [7:0] d [4];   // 02 * s

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      s[r] = col_i[31 - 8*r -: 8];
      d[r] = xtime(s[r]);
    end
    // row r of the result: 02*s[r] ^ 03*s[r+1] ^ s[r+2] ^ s[r+3]
    for (int r = 0; r < 4; r++) begin
      col_o[31 - 8*r -: 8] = d[r] ^ d[(r+1)%4] ^ s[(r+1)%4] ^ s[(r+2)%4] ^ s[(r+3)%4];
    end
  end

endmodule
