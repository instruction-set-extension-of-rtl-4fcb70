// tb_aes_mixcolumn: known columns (db 13 53 45 -> 8e 4d a1 bc and the first
// FIPS-197 round column) and random columns against a general GF(2^8)
// matrix multiply.
module tb_aes_mixcolumn;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] col_i, col_o;

  aes_mixcolumn dut (.col_i, .col_o);

  task automatic expect_col(input logic [31:0] c, input logic [31:0] e);
    col_i = c; #1;
    checks++;
    if (col_o !== e) begin
      failures++;
      $display("FAIL mixcolumn(%08h) = %08h, expected %08h", c, col_o, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_col(32'hdb135345, 32'h8e4da1bc);
    expect_col(32'hd4bf5d30, 32'h046681e5);
    expect_col(32'h01010101, 32'h01010101);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] c = $urandom;
      expect_col(c, mixcol(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
