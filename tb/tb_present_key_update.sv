// tb_present_key_update: random keys and every round counter against a
// bit-by-bit model of rotate-by-61, S-box on the top nibble and counter XOR.
module tb_present_key_update;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [79:0] key_i, key_o;
  logic [4:0]  round_counter;

  present_key_update dut (.key_i, .round_counter, .key_o);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all-zero key, round 1: rotation keeps zeros, S(0) = C, counter 1 at bit 15
    key_i = '0; round_counter = 5'd1; #1;
    checks++;
    if (key_o !== {4'hC, 60'd0, 16'h8000}) begin failures++; $display("FAIL zero key %020h", key_o); end
    for (int i = 0; i < 300; i++) begin
      key_i = {16'($urandom), $urandom, $urandom};
      round_counter = 5'(1 + $urandom % 31); #1;
      checks++;
      if (key_o !== p_keyupd(key_i, int'(round_counter))) begin
        failures++; $display("FAIL key %020h rc %0d -> %020h", key_i, round_counter, key_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
