// leon3_ise_iu: execute slice of the Leon3 integer unit with the AES
// instruction-set extension.
//
// Each clock in which insn_valid is high one SPARC V8 instruction is decoded
// (sparc_ise_decoder), its operands are read from the register file (r[rs1]
// and either r[rs2] or simm13), and the result of the adder, the shifter or
// the widened logic unit (leon3_logic_unit, which holds SubByte, ShiftRow and
// MixColumn) is written to r[rd] at the next rising edge.  The next
// instruction therefore already sees the result: one instruction per cycle,
// one cycle latency, no stalls.  The cc forms update icc (N, Z, V, C):
// logic operations clear V and C, the adder forms set them as SPARC V8
// defines (C is the borrow after a subtract); ADDX/SUBX take icc.c in;
// the AES instructions never touch icc.  Illegal words retire with
// illegal = 1 and change nothing.
//
// wb_valid/wb_rd/wb_data report the retired instruction one cycle after it
// was presented.  dbg_addr/dbg_data read any register.  n_subbyte,
// n_shiftrow and n_mixcol count retired AES instructions.
//
// The surrounding Leon3 pipeline (fetch, branches, register windows, memory
// access) is not part of this slice; the instruction stream comes from the
// insn port.  That cut, and the single-cycle timing, are this design's own.
module leon3_ise_iu
  import ise_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        insn_valid,
  input  logic [31:0] insn,
  output logic        wb_valid,
  output logic [4:0]  wb_rd,
  output logic [31:0] wb_data,
  output logic        illegal,
  output icc_t        icc,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data,
  output logic [31:0] n_subbyte,
  output logic [31:0] n_shiftrow,
  output logic [31:0] n_mixcol
);

  sparc_dec_t  dec;
  logic [31:0] rs1_val, rs2_val;
  logic [31:0] opa, opb;
  logic [31:0] add_y, shf_y, lgc_y, res;
  logic [32:0] add_full;
  logic        cin;
  icc_t        icc_nxt;
  logic        do_write;

  sparc_ise_decoder u_dec (.insn(insn), .dec(dec));

  sparc_regfile #(.NREGS(32)) u_rf (
    .clk (clk), .rst_n (rst_n),
    .ra1 (dec.rs1), .rd1 (rs1_val),
    .ra2 (dec.rs2), .rd2 (rs2_val),
    .ra3 (dbg_addr), .rd3 (dbg_data),
    .we  (do_write), .wa (dec.rd), .wd (res)
  );

  assign opa = dec.rs1_zero ? 32'd0 : rs1_val;
  assign opb = dec.use_imm ? dec.imm : rs2_val;

  // adder: a + b + cin, or a - b - cin as a + ~b + 1 - cin; cin is icc.c for
  // ADDX/SUBX and 0 otherwise
  assign cin      = dec.use_c & icc.c;
  assign add_full = {1'b0, opa} + {1'b0, dec.sub ? ~opb : opb} + 33'(dec.sub ^ cin);
  assign add_y    = add_full[31:0];

  // shifter: count is the low five bits of operand 2
  always_comb begin
    case (dec.sop)
      SH_SLL:  shf_y = opa << opb[4:0];
      SH_SRL:  shf_y = opa >> opb[4:0];
      default: shf_y = $unsigned($signed(opa) >>> opb[4:0]);
    endcase
  end

  leon3_logic_unit u_logic (.op(dec.lop), .a(opa), .b(opb), .y(lgc_y));

  always_comb begin
    case (dec.fu)
      FU_ADDER: res = add_y;
      FU_SHIFT: res = shf_y;
      default:  res = lgc_y;
    endcase
  end

  // condition codes
  always_comb begin
    icc_nxt   = icc;
    icc_nxt.n = res[31];
    icc_nxt.z = (res == 32'd0);
    if (dec.fu == FU_ADDER) begin
      if (dec.sub) begin
        icc_nxt.v = (opa[31] != opb[31]) && (res[31] != opa[31]);
        icc_nxt.c = ~add_full[32];          // borrow
      end else begin
        icc_nxt.v = (opa[31] == opb[31]) && (res[31] != opa[31]);
        icc_nxt.c = add_full[32];
      end
    end else begin
      icc_nxt.v = 1'b0;
      icc_nxt.c = 1'b0;
    end
  end

  assign do_write = insn_valid && dec.legal && dec.we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_valid   <= 1'b0;
      wb_rd      <= '0;
      wb_data    <= '0;
      illegal    <= 1'b0;
      icc        <= '0;
      n_subbyte  <= '0;
      n_shiftrow <= '0;
      n_mixcol   <= '0;
    end else begin
      wb_valid <= insn_valid;
      illegal  <= insn_valid && !dec.legal;
      if (insn_valid) begin
        wb_rd   <= dec.legal ? dec.rd : 5'd0;
        wb_data <= dec.legal ? res : 32'd0;
      end
      if (insn_valid && dec.legal && dec.set_cc) icc <= icc_nxt;
      if (insn_valid && dec.legal && dec.fu == FU_LOGIC) begin
        if (dec.lop == LOP_SUBBYTE)  n_subbyte  <= n_subbyte + 1;
        if (dec.lop == LOP_SHIFTROW) n_shiftrow <= n_shiftrow + 1;
        if (dec.lop == LOP_MIXCOL)   n_mixcol   <= n_mixcol + 1;
      end
    end
  end

  // every presented instruction retires exactly one clock later; an illegal
  // word never writes the register file
  a_retire:  assert property (@(posedge clk) disable iff (!rst_n) insn_valid |=> wb_valid);
  a_no_wr:   assert property (@(posedge clk) disable iff (!rst_n) (insn_valid && !dec.legal) |-> !do_write);

endmodule
