// or1200_cust5: execution unit of the OR1200 custom instruction l.cust5.
//
// Decodes an l.cust5 rD,rA,rB,L,K word (opcode 0x3C in bits 31:26, D 25:21,
// A 20:16, B 15:11, 6-bit immediate L 10:5, 5-bit sub-operation K 4:0) and
// computes the value for rD from the values of rA (a) and rB (b):
//   K = 1  move byte : the low byte of rB replaces byte lane L[1:0] of rA
//   K = 2  set bit   : rA with bit L[4:0] set
//   K = 3  clear bit : rA with bit L[4:0] cleared
//   other K          : rA unchanged
// is_cust5 tells whether the word is an l.cust5 at all.  Combinational; it
// sits beside the ALU of the core.  Field positions and the opcode follow
// the OpenRISC 1000 architecture.  The A and B fields select registers in
// the core's register file, so this unit does not read them; of b only the
// low byte and of L only bits 4:0 matter, which leaves those input bits
// unused on purpose.
module or1200_cust5 (
  input  logic [31:0] insn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        is_cust5,
  output logic [4:0]  rd,
  output logic [31:0] result
);

  localparam logic [5:0] OPC_CUST5 = 6'h3C;

  logic [5:0] limm;
  logic [4:0] k;

  assign is_cust5 = (insn[31:26] == OPC_CUST5);
  assign rd       = insn[25:21];
  assign limm     = insn[10:5];
  assign k        = insn[4:0];

  always_comb begin
    result = a;
    case (k)
      5'd1: case (limm[1:0])
              2'd0:    result = {a[31:8],  b[7:0]};
              2'd1:    result = {a[31:16], b[7:0], a[7:0]};
              2'd2:    result = {a[31:24], b[7:0], a[15:0]};
              default: result = {b[7:0],   a[23:0]};
            endcase
      5'd2: result = a |  (32'd1 << limm[4:0]);
      5'd3: result = a & ~(32'd1 << limm[4:0]);
      default: result = a;
    endcase
  end

endmodule
