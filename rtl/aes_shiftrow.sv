// aes_shiftrow: datapath of the ShiftRow instruction (new_ins_2, op3 = 0x19).
//
// Rotates one 32-bit state row left by shamt byte positions (0..3), the
// per-row step of the AES ShiftRow operation: row r of the state is shifted
// by r cells.  With column 0 in bits 31:24, a left shift by one cell is a
// left rotation of the word by eight bits.  The rotation is pure wiring
// selected by a 4-way multiplexer.  Combinational.
module aes_shiftrow (
  input  logic [31:0] row_i,
  input  logic [1:0]  shamt,
  output logic [31:0] row_o
);

  always_comb begin
    case (shamt)
      2'd0:    row_o = row_i;
      2'd1:    row_o = {row_i[23:0], row_i[31:24]};
      2'd2:    row_o = {row_i[15:0], row_i[31:16]};
      default: row_o = {row_i[7:0],  row_i[31:8]};
    endcase
  end

endmodule
