// tb_present80_core: the four published PRESENT-80 test vectors and random
// blocks against the reference cipher.  Checks that done rises exactly 31
// clocks after the load edge (one round per clock), that busy covers the
// rounds, and that a start while busy is ignored.
module tb_present80_core;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [63:0] plaintext, ciphertext;
  logic [79:0] key;

  present80_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] p, input logic [79:0] k, input logic [63:0] exp_c,
                     input bit poke_busy);
    int cyc = 0;
    @(negedge clk);
    start = 1; plaintext = p; key = k;
    @(negedge clk);              // load edge has passed
    start = 0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL busy/done after load"); end
    if (poke_busy) begin
      start = 1; plaintext = ~p; key = ~k;   // must be ignored
    end
    while (!done && cyc < 100) begin
      @(negedge clk);
      start = 0;
      cyc++;
    end
    checks += 3;
    if (cyc != 31) begin failures++; $display("FAIL latency %0d clocks after load, expected 31", cyc); end
    if (busy) begin failures++; $display("FAIL busy with done"); end
    if (ciphertext !== exp_c) begin failures++; $display("FAIL ct %016h expected %016h", ciphertext, exp_c); end
    repeat (2) @(negedge clk);
    checks++;
    if (!done || ciphertext !== exp_c) begin failures++; $display("FAIL result not held"); end
  endtask

  initial begin
    start = 0; plaintext = '0; key = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(64'h0, 80'h0, 64'h5579C1387B228445, 0);
    run(64'h0, {80{1'b1}}, 64'hE72C46C0F5945049, 1);
    run({64{1'b1}}, 80'h0, 64'hA112FFC72F68417B, 0);
    run({64{1'b1}}, {80{1'b1}}, 64'h3333DCD3213210D2, 0);
    for (int i = 0; i < 20; i++) begin
      logic [63:0] p = {$urandom, $urandom};
      logic [79:0] k = {16'($urandom), $urandom, $urandom};
      run(p, k, present80(p, k), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
