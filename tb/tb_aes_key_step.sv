// tb_aes_key_step: expands the FIPS-197 example key through all ten rounds
// and compares each round key with the reference schedule; the last one
// must be d014f9a8 c9ee2589 e13f0cc8 b6630ca6.
module tb_aes_key_step;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] key_i, key_o, ref_k;
  logic [3:0]   round;

  aes_key_step dut (.key_i, .round, .key_o);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_i = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ref_k = key_i;
    for (int r = 1; r <= 10; r++) begin
      round = 4'(r); #1;
      ref_k = key_next(ref_k, r);
      checks++;
      if (key_o !== ref_k) begin failures++; $display("FAIL round %0d key %032h expected %032h", r, key_o, ref_k); end
      key_i = key_o;
    end
    checks++;
    if (key_i !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FAIL final key %032h", key_i); end
    for (int i = 0; i < 50; i++) begin
      key_i = {$urandom, $urandom, $urandom, $urandom};
      round = 4'(1 + $urandom % 10); #1;
      checks++;
      if (key_o !== key_next(key_i, int'(round))) begin failures++; $display("FAIL random key round %0d", round); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
