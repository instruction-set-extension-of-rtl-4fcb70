// tb_secure_iot_ise_top: end-to-end test of the whole design at its default
// parameters.
//
// 1. Leon3 execute slice: a complete AES-128 encryption written as a SPARC V8
//    instruction program that uses the three new instructions.  The state is
//    held as four row registers, the key as four column registers; SubByte
//    and ShiftRow work on rows, MixColumn on columns, and the row/column
//    conversions use ShiftRow, AND with byte masks and OR (no right shift).
//    The key schedule uses ShiftRow by one byte, SubByte and XOR with Rc.
//    The state after round 1 is compared with the stand-alone aes_round1
//    hardware; the final ciphertext with FIPS-197
//    (3925841d 02dc09fb dc118597 196a0b32) and with the reference cipher,
//    for the FIPS-197 block and for random blocks.
// 2. PRESENT-80: the four published test vectors, latency 31 clocks.
// 3. OR1200 l.cust5: the move-byte / set-bit / clear-bit test program.
// Every mechanism is counted and must occur: each AES instruction, the
// condition-code update, a carry passed on by ADDX, an illegal word, the first-round hardware, PRESENT
// busy->done, and each l.cust5 operation.
module tb_secure_iot_ise_top;
  import ise_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic         iu_insn_valid = 0;
  logic [31:0]  iu_insn = 0;
  logic         iu_wb_valid, iu_illegal;
  logic [4:0]   iu_wb_rd;
  logic [31:0]  iu_wb_data;
  icc_t         iu_icc;
  logic [4:0]   iu_dbg_addr = 0;
  logic [31:0]  iu_dbg_data, iu_n_subbyte, iu_n_shiftrow, iu_n_mixcol;
  logic         aes_in_valid = 0, aes_out_valid;
  logic [127:0] aes_plain = 0, aes_key = 0, aes_state, aes_rkey;
  logic         prs_start = 0, prs_busy, prs_done;
  logic [63:0]  prs_plaintext = 0, prs_ciphertext;
  logic [79:0]  prs_key = 0;
  logic [31:0]  c5_insn = 0, c5_a = 0, c5_b = 0, c5_result;
  logic         c5_is_cust5;
  logic [4:0]   c5_rd;

  secure_iot_ise_top dut (.*);

  always #5 clk = ~clk;

  int n_illegal = 0, n_icc = 0, n_carry = 0, n_round1 = 0, n_present = 0, n_movbyte = 0, n_setbit = 0, n_clrbit = 0;
  int n_insn = 0;
  logic [127:0] last_ct;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- SPARC program helpers ----------------
  // register plan: r1..r4 state rows, r5..r8 key columns, r9..r12 columns,
  // r13..r16 key rows, r17 temp, r18 accumulator, r24..r27 byte masks
  localparam int ROW = 1, KCOL = 5, COL = 9, KROW = 13, T = 17, ACC = 18, MASK = 24;

  task automatic op(input logic [31:0] w);
    @(negedge clk);
    iu_insn_valid = 1; iu_insn = w;
    n_insn++;
    @(posedge clk);
    #1 iu_insn_valid = 0;
  endtask

  task automatic setreg(input int rd, input logic [31:0] v);
    op(sp_sethi(rd, v[31:10]));
    op(sp_f3i(OP3_OR, rd, rd, int'(v[9:0])));
  endtask


  // dst[j] byte i = src[i] byte j, with src/dst four consecutive registers
  task automatic transpose(input int src, input int dst);
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) begin
        int k = (j - i + 4) % 4;   // src[i] byte j moves to position i
        op(sp_f3i(OP3_SHIFTROW, T, src + i, k));
        op(sp_f3(OP3_AND, T, T, MASK + i));
        if (i == 0) op(sp_f3(OP3_OR, ACC, 0, T));
        else        op(sp_f3(OP3_OR, ACC, ACC, T));
      end
      op(sp_f3(OP3_OR, dst + j, 0, ACC));
    end
  endtask

  task automatic add_round_key();
    transpose(KCOL, KROW);
    for (int r = 0; r < 4; r++) op(sp_f3(OP3_XOR, ROW + r, ROW + r, KROW + r));
  endtask

  task automatic key_step(input int rnd);
    op(sp_f3i(OP3_SHIFTROW, T, KCOL + 3, 1));
    op(sp_f3(OP3_SUBBYTE, T, T, 0));
    op(sp_sethi(ACC, 22'({rcon(rnd), 24'h0} >> 10)));
    op(sp_f3(OP3_XOR, T, T, ACC));
    op(sp_f3(OP3_XOR, KCOL, KCOL, T));
    for (int c = 1; c < 4; c++) op(sp_f3(OP3_XOR, KCOL + c, KCOL + c, KCOL + c - 1));
  endtask

  // reads four consecutive registers through the debug port
  task automatic cols_of(input int base, output logic [127:0] v);
    for (int i = 0; i < 4; i++) begin
      iu_dbg_addr = 5'(base + i);
      #1 v[127 - 32*i -: 32] = iu_dbg_data;
    end
  endtask

  task automatic aes_program(input logic [127:0] pt, input logic [127:0] key, input bit check_round1);
    logic [127:0] ct, st, rk;
    int start_insn = n_insn;
    for (int i = 0; i < 4; i++) setreg(MASK + i, 32'hFF000000 >> (8 * i));
    for (int c = 0; c < 4; c++) setreg(COL + c, pt[127 - 32*c -: 32]);
    for (int c = 0; c < 4; c++) setreg(KCOL + c, key[127 - 32*c -: 32]);
    transpose(COL, ROW);
    add_round_key();
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++) op(sp_f3(OP3_SUBBYTE, ROW + r, ROW + r, 0));
      for (int r = 1; r < 4; r++) op(sp_f3i(OP3_SHIFTROW, ROW + r, ROW + r, r));
      if (rnd != 10) begin
        transpose(ROW, COL);
        for (int c = 0; c < 4; c++) op(sp_f3(OP3_MIXCOL, COL + c, COL + c, 0));
        transpose(COL, ROW);
      end
      key_step(rnd);
      add_round_key();
      if (rnd == 1 && check_round1) begin
        transpose(ROW, COL);
        // same block through the stand-alone first-round hardware
        @(negedge clk);
        aes_in_valid = 1; aes_plain = pt; aes_key = key;
        @(negedge clk);
        aes_in_valid = 0;
        check(aes_out_valid, "aes_round1 out_valid");
        if (aes_out_valid) n_round1++;
        cols_of(COL, st);
        cols_of(KCOL, rk);
        check(st === aes_state, $sformatf("round-1 state program %032h vs hardware %032h", st, aes_state));
        check(rk === aes_rkey, "round key 1 program vs hardware");
        check(aes_state === aes128(pt, key, 1), "aes_round1 vs reference");
      end
    end
    transpose(ROW, COL);
    cols_of(COL, ct);
    check(ct === aes128(pt, key, 10), $sformatf("AES program ct %032h expected %032h", ct, aes128(pt, key, 10)));
    $display("AES-128 program: pt %032h -> ct %032h in %0d instructions", pt, ct, n_insn - start_insn);
    last_ct = ct;
  endtask

  // ---------------- PRESENT ----------------
  task automatic present_run(input logic [63:0] p, input logic [79:0] k, input logic [63:0] e);
    int cyc = 0;
    @(negedge clk);
    prs_start = 1; prs_plaintext = p; prs_key = k;
    @(negedge clk);
    prs_start = 0;
    while (!prs_done && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == 31, $sformatf("PRESENT latency %0d", cyc));
    check(prs_ciphertext === e, $sformatf("PRESENT ct %016h expected %016h", prs_ciphertext, e));
    if (prs_done) n_present++;
  endtask

  // ---------------- l.cust5 ----------------
  task automatic c5(input int k, input int l, input logic [31:0] a, input logic [31:0] b, output logic [31:0] r);
    c5_insn = cust5_enc(2, 3, 4, l, k); c5_a = a; c5_b = b;
    #1;
    check(c5_is_cust5 && c5_rd == 2, "l.cust5 decode");
    check(c5_result === cust5_ref(a, b, l, k), "l.cust5 result");
    if (k == 1) n_movbyte++;
    if (k == 2) n_setbit++;
    if (k == 3) n_clrbit++;
    r = c5_result;
  endtask

  initial begin
    logic [31:0] d, r, total;
    int bits [4] = '{10, 15, 19, 25};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // --- AES-128 on the extended Leon3 slice ---
    aes_program(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 1);
    check(last_ct === 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 ciphertext");
    for (int i = 0; i < 3; i++)
      aes_program({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 1);
    // condition codes and an illegal word
    op(sp_f3(OP3_XORCC, T, ROW, ROW));
    check(iu_icc.z && !iu_icc.n, "xorcc sets Z");
    if (iu_icc.z) n_icc++;
    // 64-bit add {1, FFFFFFFF} + {2, 1}: addcc on the low words, addx on the
    // high words takes the carry
    setreg(T, 32'hFFFFFFFF); setreg(ACC, 32'h00000001);
    op(sp_f3(OP3_ADDCC, T, T, ACC));
    check(iu_wb_data == 32'h0 && iu_icc.c, "addcc low word carries out");
    setreg(T, 32'h00000001); setreg(ACC, 32'h00000002);
    op(sp_f3(OP3_ADDX, T, T, ACC));
    check(iu_wb_data == 32'h4, "addx high word adds the carry");
    if (iu_wb_data == 32'h4) n_carry++;
    op(sp_f3(6'h3C, 1, 1, 1));                // SAVE: not executed
    check(iu_illegal, "SAVE flagged illegal");
    if (iu_illegal) n_illegal++;

    // --- PRESENT-80 ---
    present_run(64'h0, 80'h0, 64'h5579C1387B228445);
    present_run(64'h0, {80{1'b1}}, 64'hE72C46C0F5945049);
    present_run({64{1'b1}}, 80'h0, 64'hA112FFC72F68417B);
    present_run({64{1'b1}}, {80{1'b1}}, 64'h3333DCD3213210D2);

    // --- OR1200 l.cust5 test application ---
    d = 32'haabbccdd; r = d;
    for (int i = 0; i < 4; i++) begin c5(1, i, d, 32'h12345678, d); r += d; end
    total = r;
    d = 0; r = 0;
    foreach (bits[i]) begin c5(2, bits[i], d, 0, d); r += d; end
    total += r;
    d = 32'hffffffff; r = d;
    foreach (bits[i]) begin c5(3, bits[i], d, 0, d); r += d; end
    total += r;
    $display("l.cust5 test program RESULT: %08h", total);

    // --- mechanism coverage ---
    $display("instructions %0d: SubByte %0d ShiftRow %0d MixColumn %0d, icc %0d, carry %0d, illegal %0d, aes_round1 %0d, PRESENT %0d, movbyte %0d setbit %0d clrbit %0d",
             n_insn, iu_n_subbyte, iu_n_shiftrow, iu_n_mixcol, n_icc, n_carry, n_illegal, n_round1, n_present, n_movbyte, n_setbit, n_clrbit);
    check(iu_n_subbyte > 0,  "SubByte executed");
    check(iu_n_shiftrow > 0, "ShiftRow executed");
    check(iu_n_mixcol > 0,   "MixColumn executed");
    check(n_icc > 0 && n_carry > 0 && n_illegal > 0 && n_round1 > 0 && n_present > 0, "icc/carry/illegal/round1/PRESENT occurred");
    check(n_movbyte > 0 && n_setbit > 0 && n_clrbit > 0, "l.cust5 operations occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
