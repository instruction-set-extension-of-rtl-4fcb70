// tb_or1200_cust5: replays the custom-instruction test program (move byte of
// 0x12345678 into every lane of 0xaabbccdd, set bits 10/15/19/25 of 0, clear
// the same bits of 0xffffffff, summing each result into a checksum) and
// random operands against a byte/bit-array model.
module tb_or1200_cust5;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] insn, a, b, result;
  logic        is_cust5;
  logic [4:0]  rd;

  or1200_cust5 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(input int k, input int l, input logic [31:0] va, input logic [31:0] vb,
                     output logic [31:0] res);
    insn = cust5_enc(3, 4, 5, l, k);
    a = va; b = vb;
    #1;
    checks += 2;
    if (!is_cust5 || rd != 3) begin failures++; $display("FAIL decode %08h", insn); end
    if (result !== cust5_ref(va, vb, l, k)) begin
      failures++; $display("FAIL k=%0d l=%0d a=%08h b=%08h -> %08h exp %08h", k, l, va, vb, result, cust5_ref(va, vb, l, k));
    end
    res = result;
  endtask

  initial begin
    logic [31:0] d, r, total;
    int bits [4] = '{10, 15, 19, 25};
    // test_movbyte
    d = 32'haabbccdd; r = d;
    for (int i = 0; i < 4; i++) begin exec(1, i, d, 32'h12345678, d); r += d; end
    checks++;
    if (d !== 32'h78787878) begin failures++; $display("FAIL movbyte final %08h", d); end
    total = r;
    // test_setbit
    d = 0; r = 0;
    foreach (bits[i]) begin exec(2, bits[i], d, 32'h0, d); r += d; end
    checks++;
    if (d !== 32'h02088400) begin failures++; $display("FAIL setbit final %08h", d); end
    total += r;
    // test_clrbit
    d = 32'hffffffff; r = d;
    foreach (bits[i]) begin exec(3, bits[i], d, 32'h0, d); r += d; end
    checks++;
    if (d !== 32'hfdf77bff) begin failures++; $display("FAIL clrbit final %08h", d); end
    total += r;
    $display("test program RESULT: %08h", total);
    // other K leaves rA, and a non-cust5 opcode is flagged
    exec(0, 5, 32'hdeadbeef, 32'h1, d);
    insn = 32'hE0221000; #1;   // l.add
    checks++;
    if (is_cust5) begin failures++; $display("FAIL l.add seen as l.cust5"); end
    for (int i = 0; i < 300; i++)
      exec(1 + $urandom % 3, $urandom % 64, $urandom, $urandom, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
