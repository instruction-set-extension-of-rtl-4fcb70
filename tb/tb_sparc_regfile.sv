// tb_sparc_regfile: random writes and reads against a shadow array; %g0 must
// stay zero; reset clears everything.
module tb_sparc_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic we;
  logic [31:0] shadow [32];

  sparc_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      ra3 = 5'(i); #1;
      checks++;
      if (rd3 !== 0) begin failures++; $display("FAIL reset r%0d=%08h", i, rd3); end
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom);
      #1;
      checks += 3;
      if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL rd1 r%0d=%08h exp %08h", ra1, rd1, shadow[ra1]); end
      if (rd2 !== shadow[ra2]) begin failures++; $display("FAIL rd2 r%0d", ra2); end
      if (rd3 !== shadow[ra3]) begin failures++; $display("FAIL rd3 r%0d", ra3); end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
