// aes_key_step: one step of the AES-128 key schedule.
//
// The round key is four 32-bit columns w0..w3 (w0 in bits 127:96, row 0 in
// the top byte of each column).  The next key is
//   t  = T(w3) = SubByte(rotate-left-one-byte(w3)) ^ {Rc(round), 24'h0}
//   w4 = w0 ^ t, w5 = w1 ^ w4, w6 = w2 ^ w5, w7 = w3 ^ w6
// i.e. the first new column uses the T operation and every other one XORs
// the previous column with the column four places back.  Rc follows the
// standard table (01 02 04 08 10 20 40 80 1B 36 for rounds 1..10); rounds
// outside 1..10 use Rc = 0.  Reuses the ShiftRow and SubByte datapaths.
// Combinational.
module aes_key_step (
  input  logic [127:0] key_i,
  input  logic [3:0]   round,
  output logic [127:0] key_o
);

  logic [31:0] w [4];
  logic [31:0] rot, sub, t;
  logic [7:0]  rc;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_i[127 - 32*i -: 32];
  end

  always_comb begin
    case (round)
      4'd1:    rc = 8'h01;
      4'd2:    rc = 8'h02;
      4'd3:    rc = 8'h04;
      4'd4:    rc = 8'h08;
      4'd5:    rc = 8'h10;
      4'd6:    rc = 8'h20;
      4'd7:    rc = 8'h40;
      4'd8:    rc = 8'h80;
      4'd9:    rc = 8'h1b;
      4'd10:   rc = 8'h36;
      default: rc = 8'h00;
    endcase
  end

  aes_shiftrow u_rot (.row_i(w[3]), .shamt(2'd1), .row_o(rot));
  aes_subbyte  u_sub (.row_i(rot), .row_o(sub));

  assign t = sub ^ {rc, 24'h0};

  logic [31:0] n0, n1, n2, n3;
  assign n0 = w[0] ^ t;
  assign n1 = w[1] ^ n0;
  assign n2 = w[2] ^ n1;
  assign n3 = w[3] ^ n2;
  assign key_o = {n0, n1, n2, n3};

endmodule
