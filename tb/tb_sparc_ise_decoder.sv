// tb_sparc_ise_decoder: decodes the three extension words as printed
// (82680801, 82C88001, 82E88001), the AND they replace (82088001), the other
// executed instructions and some words outside the subset.
module tb_sparc_ise_decoder;
  import ise_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] insn;
  sparc_dec_t  dec;

  sparc_ise_decoder dut (.insn, .dec);

  task automatic expect_logic(input logic [31:0] w, input logic_op_e lop, input logic cc);
    insn = w; #1;
    checks++;
    if (!(dec.legal && dec.we && dec.fu == FU_LOGIC && dec.lop == lop && dec.set_cc == cc)) begin
      failures++;
      $display("FAIL %08h: legal=%b fu=%0d lop=%s cc=%b, expected %s", w, dec.legal, dec.fu, dec.lop.name(), dec.set_cc, lop.name());
    end
  endtask

  task automatic expect_illegal(input logic [31:0] w);
    insn = w; #1;
    checks++;
    if (dec.legal || dec.we) begin failures++; $display("FAIL %08h should be illegal", w); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_logic(32'h82680801, LOP_SUBBYTE, 1'b0);
    expect_logic(32'h82C88001, LOP_SHIFTROW, 1'b0);
    expect_logic(32'h82E88001, LOP_MIXCOL, 1'b0);
    expect_logic(32'h82088001, LOP_AND, 1'b0);
    // and %g2,%g1,%g1 fields
    insn = 32'h82088001; #1;
    checks++;
    if (dec.rd != 1 || dec.rs1 != 2 || dec.rs2 != 1 || dec.use_imm) begin failures++; $display("FAIL fields"); end
    expect_logic(sp_f3(6'h11, 3, 4, 5), LOP_AND, 1'b1);
    expect_logic(sp_f3(6'h02, 3, 4, 5), LOP_OR, 1'b0);
    expect_logic(sp_f3(6'h12, 3, 4, 5), LOP_OR, 1'b1);
    expect_logic(sp_f3(6'h03, 3, 4, 5), LOP_XOR, 1'b0);
    expect_logic(sp_f3(6'h13, 3, 4, 5), LOP_XOR, 1'b1);
    expect_logic(sp_f3(6'h05, 3, 4, 5), LOP_ANDN, 1'b0);
    expect_logic(sp_f3(6'h15, 3, 4, 5), LOP_ANDN, 1'b1);
    expect_logic(sp_f3(6'h06, 3, 4, 5), LOP_ORN, 1'b0);
    expect_logic(sp_f3(6'h16, 3, 4, 5), LOP_ORN, 1'b1);
    expect_logic(sp_f3(6'h07, 3, 4, 5), LOP_XNOR, 1'b0);
    expect_logic(sp_f3(6'h17, 3, 4, 5), LOP_XNOR, 1'b1);
    // immediate form
    insn = sp_f3i(6'h19, 7, 8, -2); #1;
    checks++;
    if (!dec.use_imm || dec.imm != 32'hFFFFFFFE || dec.rd != 7 || dec.rs1 != 8) begin failures++; $display("FAIL simm13"); end
    // SETHI
    insn = sp_sethi(9, 22'h3ABCDE); #1;
    checks++;
    if (!(dec.legal && dec.rs1_zero && dec.use_imm && dec.imm == {22'h3ABCDE, 10'b0} && dec.rd == 9 && dec.lop == LOP_PASS2))
      begin failures++; $display("FAIL sethi"); end
    // adder and shifter
    insn = sp_f3(6'h04, 1, 2, 3); #1;
    checks++;
    if (!(dec.legal && dec.fu == FU_ADDER && dec.sub && !dec.set_cc)) begin failures++; $display("FAIL sub"); end
    insn = sp_f3(6'h10, 1, 2, 3); #1;
    checks++;
    if (!(dec.legal && dec.fu == FU_ADDER && !dec.sub && dec.set_cc)) begin failures++; $display("FAIL addcc"); end
    insn = sp_f3(6'h08, 1, 2, 3); #1;
    checks++;
    if (!(dec.legal && dec.fu == FU_ADDER && !dec.sub && dec.use_c && !dec.set_cc)) begin failures++; $display("FAIL addx"); end
    insn = sp_f3(6'h1C, 1, 2, 3); #1;
    checks++;
    if (!(dec.legal && dec.fu == FU_ADDER && dec.sub && dec.use_c && dec.set_cc)) begin failures++; $display("FAIL subxcc"); end
    insn = sp_f3(6'h14, 1, 2, 3); #1;
    checks++;
    if (dec.use_c) begin failures++; $display("FAIL subcc takes carry"); end
    insn = sp_f3(6'h26, 1, 2, 3); #1;
    checks++;
    if (!(dec.legal && dec.fu == FU_SHIFT && dec.sop == SH_SRL)) begin failures++; $display("FAIL srl"); end
    // outside the subset
    expect_illegal(sp_f3(6'h09, 1, 2, 3));
    expect_illegal(sp_f3(6'h3C, 1, 2, 3));   // SAVE
    expect_illegal(32'h40000000);             // CALL
    expect_illegal(32'hC2002000);             // load
    expect_illegal(32'h10800004);             // branch
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
