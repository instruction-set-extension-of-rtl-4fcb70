// sparc_ise_decoder: instruction decoder of the extended SPARC V8 execute slice.
//
// Splits a 32-bit SPARC V8 word into its fields (op, rd, op3, rs1, i, rs2,
// simm13 of format 3; op2 and imm22 of format 2) and produces the control of
// the execute slice as an ise_pkg::sparc_dec_t.  The executed subset is the
// register-to-register arithmetic, logic and shift group (ADD, SUB, ADDX and
// SUBX with carry/borrow in, the six logic operations, their cc forms,
// SLL/SRL/SRA), SETHI, and the three AES
// instructions of the extension, which use the format of AND and take free
// op3 codes: 0x0D SubByte, 0x19 ShiftRow, 0x1D MixColumn.  The second
// operand is r[rs2] when i = 0 and the sign-extended simm13 when i = 1.
// Any other word is marked not legal and writes nothing.  Combinational.
module sparc_ise_decoder
  import ise_pkg::*;
(
  input  logic [31:0] insn,
  output sparc_dec_t  dec
);

  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;

  assign op  = insn[31:30];
  assign op2 = insn[24:22];
  assign op3 = insn[24:19];

  always_comb begin
    dec          = '0;
    dec.rd       = insn[29:25];
    dec.rs1      = insn[18:14];
    dec.rs2      = insn[4:0];
    dec.use_imm  = insn[13];
    dec.imm      = {{19{insn[12]}}, insn[12:0]};
    dec.fu       = FU_LOGIC;
    dec.lop      = LOP_AND;
    dec.sop      = SH_SLL;

    if (op == OP_FMT2 && op2 == OP2_SETHI) begin
      dec.legal    = 1'b1;
      dec.we       = 1'b1;
      dec.use_imm  = 1'b1;
      dec.imm      = {insn[21:0], 10'b0};
      dec.rs1_zero = 1'b1;
      dec.lop      = LOP_PASS2;
    end else if (op == OP_ARITH) begin
      dec.legal = 1'b1;
      dec.we    = 1'b1;
      case (op3)
        OP3_ADD, OP3_ADDCC: begin dec.fu = FU_ADDER; dec.set_cc = op3[4]; end
        OP3_SUB, OP3_SUBCC: begin dec.fu = FU_ADDER; dec.sub = 1'b1; dec.set_cc = op3[4]; end
        OP3_ADDX, OP3_ADDXCC: begin dec.fu = FU_ADDER; dec.use_c = 1'b1; dec.set_cc = op3[4]; end
        OP3_SUBX, OP3_SUBXCC: begin dec.fu = FU_ADDER; dec.sub = 1'b1; dec.use_c = 1'b1; dec.set_cc = op3[4]; end
        OP3_AND,  OP3_ANDCC:  begin dec.lop = LOP_AND;  dec.set_cc = op3[4]; end
        OP3_OR,   OP3_ORCC:   begin dec.lop = LOP_OR;   dec.set_cc = op3[4]; end
        OP3_XOR,  OP3_XORCC:  begin dec.lop = LOP_XOR;  dec.set_cc = op3[4]; end
        OP3_ANDN, OP3_ANDNCC: begin dec.lop = LOP_ANDN; dec.set_cc = op3[4]; end
        OP3_ORN,  OP3_ORNCC:  begin dec.lop = LOP_ORN;  dec.set_cc = op3[4]; end
        OP3_XNOR, OP3_XNORCC: begin dec.lop = LOP_XNOR; dec.set_cc = op3[4]; end
        OP3_SLL: begin dec.fu = FU_SHIFT; dec.sop = SH_SLL; end
        OP3_SRL: begin dec.fu = FU_SHIFT; dec.sop = SH_SRL; end
        OP3_SRA: begin dec.fu = FU_SHIFT; dec.sop = SH_SRA; end
        OP3_SUBBYTE:  dec.lop = LOP_SUBBYTE;
        OP3_SHIFTROW: dec.lop = LOP_SHIFTROW;
        OP3_MIXCOL:   dec.lop = LOP_MIXCOL;
        default: begin dec.legal = 1'b0; dec.we = 1'b0; end
      endcase
    end
  end

endmodule
