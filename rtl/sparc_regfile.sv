// sparc_regfile: integer register file of the SPARC V8 execute slice.
//
// NREGS 32-bit registers with two combinational read ports for the operands,
// a third read port for debug observation, and one write port written at the
// rising clock edge.  Register 0 (%g0) always reads as zero and ignores
// writes, as SPARC requires.  All registers clear on reset.  Register
// windows are not modelled: one flat set of registers is addressed by the
// 5-bit fields of the instruction (this design's simplification).
module sparc_regfile #(
  parameter int unsigned NREGS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  output logic [31:0] rd1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd2,
  input  logic [4:0]  ra3,
  output logic [31:0] rd3,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0 && 32'(wa) < NREGS) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [31:0] rdreg(input logic [4:0] a);
    return (a == 5'd0 || 32'(a) >= NREGS) ? 32'd0 : regs[a];
  endfunction

  assign rd1 = rdreg(ra1);
  assign rd2 = rdreg(ra2);
  assign rd3 = rdreg(ra3);

endmodule
