// tb_present_sbox_layer: random states against the printed 4-bit S-box.
module tb_present_sbox_layer;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] d_i, d_o;

  present_sbox_layer dut (.d_i, .d_o);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_i = 64'hFEDCBA9876543210; #1;
    checks++;
    if (d_o !== 64'h21748FE3DA09B65C) begin failures++; $display("FAIL all nibbles %016h", d_o); end
    for (int i = 0; i < 300; i++) begin
      d_i = {$urandom, $urandom}; #1;
      checks++;
      if (d_o !== p_sboxlayer(d_i)) begin failures++; $display("FAIL %016h -> %016h", d_i, d_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
