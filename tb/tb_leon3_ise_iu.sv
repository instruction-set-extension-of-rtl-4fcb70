// tb_leon3_ise_iu: random instruction streams (ADD/SUB/ADDX/SUBX and cc forms, the six
// logic operations and cc forms, shifts, SETHI, the three AES instructions,
// immediates and illegal words) on eight registers, so almost every
// instruction depends on the one before.  A shadow register file and icc
// model, written from the SPARC V8 definitions, predict every write-back one
// clock after issue; the printed extension words are executed as well.
module tb_leon3_ise_iu;
  import ise_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic insn_valid;
  logic [31:0] insn;
  logic wb_valid, illegal;
  logic [4:0] wb_rd, dbg_addr;
  logic [31:0] wb_data, dbg_data, n_subbyte, n_shiftrow, n_mixcol;
  icc_t icc;

  leon3_ise_iu dut (.*);

  always #5 clk = ~clk;

  logic [31:0] sh [32];
  icc_t        sicc;
  int          nsb = 0, nsr = 0, nmc = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference execution of one word; returns legality, writes rd/value
  task automatic model(input logic [31:0] w, output bit legal, output int rdx, output logic [31:0] val);
    logic [5:0]  op3 = w[24:19];
    logic [31:0] a = sh[w[18:14]];
    logic [31:0] b = w[13] ? {{19{w[12]}}, w[12:0]} : sh[w[4:0]];
    logic [32:0] full;
    bit cc = 0;
    legal = 1; rdx = w[29:25]; val = 0;
    if (w[31:30] == 2'b00 && w[24:22] == 3'b100) begin
      val = {w[21:0], 10'b0};
    end else if (w[31:30] == 2'b10) begin
      case (op3)
        6'h00, 6'h10: begin full = {1'b0, a} + {1'b0, b}; val = full[31:0]; cc = op3[4];
                        if (cc) begin sicc.v = (a[31] == b[31]) && (val[31] != a[31]); sicc.c = full[32]; end end
        6'h04, 6'h14: begin full = {1'b0, a} - {1'b0, b}; val = full[31:0]; cc = op3[4];
                        if (cc) begin sicc.v = (a[31] != b[31]) && (val[31] != a[31]); sicc.c = full[32]; end end
        6'h08, 6'h18: begin full = {1'b0, a} + {1'b0, b} + 33'(sicc.c); val = full[31:0]; cc = op3[4];
                        if (cc) begin sicc.v = (a[31] == b[31]) && (val[31] != a[31]); sicc.c = full[32]; end end
        6'h0C, 6'h1C: begin full = {1'b0, a} - {1'b0, b} - 33'(sicc.c); val = full[31:0]; cc = op3[4];
                        if (cc) begin sicc.v = (a[31] != b[31]) && (val[31] != a[31]); sicc.c = full[32]; end end
        6'h01, 6'h11: begin val = a & b;    cc = op3[4]; end
        6'h02, 6'h12: begin val = a | b;    cc = op3[4]; end
        6'h03, 6'h13: begin val = a ^ b;    cc = op3[4]; end
        6'h05, 6'h15: begin val = a & ~b;   cc = op3[4]; end
        6'h06, 6'h16: begin val = a | ~b;   cc = op3[4]; end
        6'h07, 6'h17: begin val = ~(a ^ b); cc = op3[4]; end
        6'h25: val = a << b[4:0];
        6'h26: val = a >> b[4:0];
        6'h27: val = 32'($signed(a) >>> b[4:0]);
        6'h0D: begin val = subword(a);               nsb++; end
        6'h19: begin val = rotbytes(a, int'(b % 4)); nsr++; end
        6'h1D: begin val = mixcol(a);                nmc++; end
        default: legal = 0;
      endcase
      if (cc) begin
        sicc.n = val[31]; sicc.z = (val == 0);
        if (!(op3 == 6'h10 || op3 == 6'h14 || op3 == 6'h18 || op3 == 6'h1C)) begin sicc.v = 0; sicc.c = 0; end
      end
    end else begin
      legal = 0;
    end
    if (legal && rdx != 0) sh[rdx] = val;
  endtask

  task automatic issue(input logic [31:0] w);
    bit legal; int rdx; logic [31:0] val;
    @(negedge clk);
    insn_valid = 1; insn = w;
    model(w, legal, rdx, val);
    @(negedge clk);
    insn_valid = 0;
    checks += 3;
    if (!wb_valid || illegal == legal) begin failures++; $display("FAIL %08h wb_valid=%b illegal=%b", w, wb_valid, illegal); end
    if (legal && (wb_rd != 5'(rdx) || wb_data !== val)) begin
      failures++; $display("FAIL %08h rd=%0d data=%08h, expected rd=%0d data=%08h", w, wb_rd, wb_data, rdx, val);
    end
    if (icc !== sicc) begin failures++; $display("FAIL %08h icc=%b expected %b", w, icc, sicc); end
  endtask

  // back-to-back issue without idle cycles, checked through the debug port
  task automatic burst(input int n);
    logic [31:0] w;
    bit legal; int rdx; logic [31:0] val;
    for (int i = 0; i < n; i++) begin
      w = rand_insn();
      @(negedge clk);
      insn_valid = 1; insn = w;
      model(w, legal, rdx, val);
    end
    @(negedge clk);
    insn_valid = 0;
    for (int r = 0; r < 8; r++) begin
      dbg_addr = 5'(r); #1;
      checks++;
      if (dbg_data !== sh[r]) begin failures++; $display("FAIL burst r%0d=%08h expected %08h", r, dbg_data, sh[r]); end
    end
  endtask

  function automatic logic [31:0] rand_insn();
    logic [5:0] ops [31] = '{6'h00, 6'h10, 6'h04, 6'h14, 6'h01, 6'h11, 6'h02, 6'h12, 6'h03,
                             6'h13, 6'h05, 6'h15, 6'h06, 6'h16, 6'h07, 6'h17, 6'h25, 6'h26,
                             6'h27, 6'h0D, 6'h19, 6'h1D, 6'h0D, 6'h19, 6'h1D, 6'h08, 6'h18,
                             6'h0C, 6'h1C, 6'h09, 6'h3C};
    int k = $urandom % 34;
    int rd = $urandom % 8, rs1 = $urandom % 8, rs2 = $urandom % 8;
    if (k >= 31) return sp_sethi(rd, 22'($urandom));
    if ($urandom % 3 == 0) return sp_f3i(ops[k], rd, rs1, int'($urandom % 8192) - 4096);
    return sp_f3(ops[k], rd, rs1, rs2);
  endfunction

  initial begin
    insn_valid = 0; insn = 0; dbg_addr = 0;
    foreach (sh[i]) sh[i] = 0;
    sicc = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // load g1, g2 and run the printed extension words
    issue(sp_sethi(1, 22'h0C9A9A)); issue(sp_f3i(6'h02, 1, 1, 12'h2E9));
    issue(sp_sethi(2, 22'h2B9A4E)); issue(sp_f3i(6'h02, 2, 2, 10'h0F1));
    issue(32'h82088001);            // and  %g2,%g1,%g1
    issue(sp_sethi(2, 22'h0C9A9A)); issue(sp_f3i(6'h02, 2, 2, 12'h2E9));
    issue(32'h82C88001);            // ShiftRow %g2 by %g1[1:0]
    issue(32'h82E88001);            // MixColumn %g2
    issue(32'h82680801);            // SubByte (rs1 = %g0 as printed)
    issue(sp_f3(6'h0D, 3, 2, 0));   // SubByte %g2 -> %g3
    for (int i = 0; i < 2000; i++) issue(rand_insn());
    for (int i = 0; i < 20; i++) burst(50);
    checks += 3;
    if (n_subbyte != 32'(nsb)) begin failures++; $display("FAIL n_subbyte %0d vs %0d", n_subbyte, nsb); end
    if (n_shiftrow != 32'(nsr)) begin failures++; $display("FAIL n_shiftrow %0d vs %0d", n_shiftrow, nsr); end
    if (n_mixcol != 32'(nmc)) begin failures++; $display("FAIL n_mixcol %0d vs %0d", n_mixcol, nmc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
