// tb_aes_sbox: checks all 256 S-box entries against the S-box computed from
// the GF(2^8) inverse and the AES affine map.
module tb_aes_sbox;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] in_byte, out_byte;

  aes_sbox dut (.in_byte, .out_byte);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      in_byte = 8'(i);
      #1;
      checks++;
      if (out_byte !== sbox(in_byte)) begin
        failures++;
        $display("FAIL sbox(%02h) = %02h, expected %02h", in_byte, out_byte, sbox(in_byte));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
