// ise_pkg: types and constants shared by the SPARC V8 execute slice with the
// AES instruction-set extension.
//
// Holds the opcode fields of the executed SPARC V8 subset, the widened 4-bit
// logic-operation code of the ALU (the original 3-bit code had only one free
// value, so it was widened to make room for the three AES operations), the
// functional-unit select and the decoded-instruction struct passed from the
// decoder to the execute slice.  The op3 codes of the AES instructions are
// the ones the extension assigns to unused SPARC V8 slots: 0x0D SubByte,
// 0x19 ShiftRow, 0x1D MixColumn.  The numeric values of logic_op_e are this
// design's own choice.
package ise_pkg;

  // SPARC V8 major formats (op field, bits 31:30)
  localparam logic [1:0] OP_FMT2  = 2'b00;  // SETHI, branches
  localparam logic [1:0] OP_ARITH = 2'b10;  // arithmetic, logic, shift

  localparam logic [2:0] OP2_SETHI = 3'b100;

  // op3 values (op = 2) of the executed subset
  localparam logic [5:0] OP3_ADD    = 6'h00;
  localparam logic [5:0] OP3_AND    = 6'h01;
  localparam logic [5:0] OP3_OR     = 6'h02;
  localparam logic [5:0] OP3_XOR    = 6'h03;
  localparam logic [5:0] OP3_SUB    = 6'h04;
  localparam logic [5:0] OP3_ANDN   = 6'h05;
  localparam logic [5:0] OP3_ORN    = 6'h06;
  localparam logic [5:0] OP3_XNOR   = 6'h07;
  localparam logic [5:0] OP3_ADDX   = 6'h08;  // add with carry
  localparam logic [5:0] OP3_SUBX   = 6'h0C;  // subtract with borrow
  localparam logic [5:0] OP3_ADDCC  = 6'h10;
  localparam logic [5:0] OP3_ANDCC  = 6'h11;
  localparam logic [5:0] OP3_ORCC   = 6'h12;
  localparam logic [5:0] OP3_XORCC  = 6'h13;
  localparam logic [5:0] OP3_SUBCC  = 6'h14;
  localparam logic [5:0] OP3_ANDNCC = 6'h15;
  localparam logic [5:0] OP3_ORNCC  = 6'h16;
  localparam logic [5:0] OP3_XNORCC = 6'h17;
  localparam logic [5:0] OP3_ADDXCC = 6'h18;
  localparam logic [5:0] OP3_SUBXCC = 6'h1C;
  localparam logic [5:0] OP3_SLL    = 6'h25;
  localparam logic [5:0] OP3_SRL    = 6'h26;
  localparam logic [5:0] OP3_SRA    = 6'h27;
  // instruction-set extension: AES operations on free op3 slots
  localparam logic [5:0] OP3_SUBBYTE  = 6'h0D;  // new_ins_1
  localparam logic [5:0] OP3_SHIFTROW = 6'h19;  // new_ins_2
  localparam logic [5:0] OP3_MIXCOL   = 6'h1D;  // new_ins_3

  // Logic-unit operation, widened from 3 to 4 bits
  typedef enum logic [3:0] {
    LOP_AND      = 4'h0,
    LOP_XOR      = 4'h1,
    LOP_OR       = 4'h2,
    LOP_XNOR     = 4'h3,
    LOP_ANDN     = 4'h4,
    LOP_ORN      = 4'h5,
    LOP_PASS2    = 4'h6,  // forwards operand 2 (used by SETHI)
    LOP_SUBBYTE  = 4'h8,
    LOP_SHIFTROW = 4'h9,
    LOP_MIXCOL   = 4'hA
  } logic_op_e;

  typedef enum logic [1:0] {
    FU_ADDER = 2'd0,
    FU_SHIFT = 2'd1,
    FU_LOGIC = 2'd2
  } fu_e;

  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd1,
    SH_SRA = 2'd2
  } shift_e;

  typedef struct packed {
    logic        legal;     // word is in the executed subset
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_imm;   // operand 2 is the immediate below
    logic [31:0] imm;       // sign-extended simm13, or imm22 << 10 for SETHI
    logic        rs1_zero;  // operand 1 forced to zero (SETHI)
    fu_e         fu;
    logic_op_e   lop;
    shift_e      sop;
    logic        sub;       // adder subtracts
    logic        use_c;     // adder takes icc.c as carry (ADDX) or borrow (SUBX) in
    logic        set_cc;    // instruction updates icc
    logic        we;        // instruction writes rd
  } sparc_dec_t;

  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } icc_t;

endpackage
