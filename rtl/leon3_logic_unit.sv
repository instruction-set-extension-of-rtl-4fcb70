// leon3_logic_unit: the logic part of the extended Leon3 ALU.
//
// The original unit selects AND, XOR, OR, XNOR, ANDN, ORN (and a pass of
// operand 2) with a 3-bit code that had a single unused value.  To hold the
// three AES operations the code is widened to 4 bits (ise_pkg::logic_op_e)
// and the new operations are added next to the old ones, so they execute in
// the same stage, with the same latency and without touching the flags:
//   SubByte  - S-box on each byte of operand a (one state row)
//   ShiftRow - rotate operand a left by b[1:0] bytes
//   MixColumn- MixColumn of operand a (one state column)
// Operand b is ignored by SubByte and MixColumn.  Combinational; unknown
// codes give zero.  The numeric code values are this design's choice.
module leon3_logic_unit
  import ise_pkg::*;
(
  input  logic_op_e   op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] sub_y, shr_y, mix_y;

  aes_subbyte   u_subbyte  (.row_i(a), .row_o(sub_y));
  aes_shiftrow  u_shiftrow (.row_i(a), .shamt(b[1:0]), .row_o(shr_y));
  aes_mixcolumn u_mixcol   (.col_i(a), .col_o(mix_y));

  always_comb begin
    case (op)
      LOP_AND:      y = a & b;
      LOP_XOR:      y = a ^ b;
      LOP_OR:       y = a | b;
      LOP_XNOR:     y = ~(a ^ b);
      LOP_ANDN:     y = a & ~b;
      LOP_ORN:      y = a | ~b;
      LOP_PASS2:    y = b;
      LOP_SUBBYTE:  y = sub_y;
      LOP_SHIFTROW: y = shr_y;
      LOP_MIXCOL:   y = mix_y;
      default:      y = '0;
    endcase
  end

endmodule
