// tb_aes_subbyte: random rows through the SubByte datapath, compared with the
// computed S-box applied byte by byte.
module tb_aes_subbyte;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] row_i, row_o;

  aes_subbyte dut (.row_i, .row_o);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      row_i = (i == 0) ? 32'h19a09ae9 : $urandom;
      #1;
      checks++;
      if (row_o !== subword(row_i)) begin
        failures++;
        $display("FAIL subbyte(%08h) = %08h, expected %08h", row_i, row_o, subword(row_i));
      end
    end
    // FIPS-197 example: first state row 19 a0 9a e9 -> d4 e0 b8 1e
    row_i = 32'h19a09ae9; #1;
    checks++;
    if (row_o !== 32'hd4e0b81e) begin failures++; $display("FAIL fixed row %08h", row_o); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
