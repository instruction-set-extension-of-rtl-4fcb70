// tb_aes_shiftrow: random rows and every shift count, compared with a byte
// indexed rotation (row'[c] = row[(c + n) mod 4]).
module tb_aes_shiftrow;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] row_i, row_o;
  logic [1:0]  shamt;

  aes_shiftrow dut (.row_i, .shamt, .row_o);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      row_i = $urandom;
      for (int n = 0; n < 4; n++) begin
        shamt = 2'(n);
        #1;
        checks++;
        if (row_o !== rotbytes(row_i, n)) begin
          failures++;
          $display("FAIL shiftrow(%08h,%0d) = %08h, expected %08h", row_i, n, row_o, rotbytes(row_i, n));
        end
      end
    end
    row_i = 32'h00010203; shamt = 2'd1; #1;
    checks++;
    if (row_o !== 32'h01020300) begin failures++; $display("FAIL fixed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
