// tb_present_player: every single-bit state and random states against the
// printed 64-entry permutation table.
module tb_present_player;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] d_i, d_o;

  present_player dut (.d_i, .d_o);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      d_i = 64'd1 << i; #1;
      checks++;
      if (d_o !== (64'd1 << PTAB[i])) begin failures++; $display("FAIL bit %0d -> %016h", i, d_o); end
    end
    for (int i = 0; i < 200; i++) begin
      d_i = {$urandom, $urandom}; #1;
      checks++;
      if (d_o !== p_player(d_i)) begin failures++; $display("FAIL %016h", d_i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
