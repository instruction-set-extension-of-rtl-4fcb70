// tb_aes_round1: FIPS-197 example (plain 3243f6a8 885a308d 313198a2 e0370734,
// key 2b7e1516 28aed2a6 abf71588 09cf4f3c; state after round 1 is
// a49c7ff2 689f352b 6b5bea43 026a5049) plus random blocks against the
// reference cipher cut after one round; checks the one-clock latency.
module tb_aes_round1;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [127:0] plain, key, state_o, rkey_o;

  aes_round1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] p, input logic [127:0] k, input logic [127:0] exp_state);
    @(negedge clk);
    in_valid = 1; plain = p; key = k;
    @(negedge clk);
    in_valid = 0; plain = '0; key = '0;
    checks += 3;
    if (!out_valid) begin failures++; $display("FAIL out_valid not one cycle after in_valid"); end
    if (state_o !== exp_state) begin failures++; $display("FAIL state %032h expected %032h", state_o, exp_state); end
    if (rkey_o !== key_next(k, 1)) begin failures++; $display("FAIL round key %032h", rkey_o); end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid held"); end
  endtask

  initial begin
    in_valid = 0; plain = '0; key = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 40; i++) begin
      logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      run(p, k, aes128(p, k, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
