// secure_iot_ise_top: the instruction-set-extension hardware for secure IoT
// processors, side by side.
//
// Four independent parts, each with its own ports:
//   iu_*  - leon3_ise_iu: SPARC V8 execute slice whose ALU carries the AES
//           instructions SubByte, ShiftRow and MixColumn (op3 0x0D/0x19/0x1D)
//   aes_* - aes_round1: stand-alone first AES-128 round built from the same
//           row/column datapaths, used to check them before the processor
//   prs_* - present80_core: pure-hardware PRESENT-80 encryption
//   c5_*  - or1200_cust5: the l.cust5 unit (move byte / set bit / clear bit)
//           of the OR1200, with its operand and result signals brought out
//           where the OR1200 core would connect
// The parts share only clock and reset.  Processor cores, buses and GPIO
// around them are outside this design.
module secure_iot_ise_top
  import ise_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // Leon3 execute slice
  input  logic         iu_insn_valid,
  input  logic [31:0]  iu_insn,
  output logic         iu_wb_valid,
  output logic [4:0]   iu_wb_rd,
  output logic [31:0]  iu_wb_data,
  output logic         iu_illegal,
  output icc_t         iu_icc,
  input  logic [4:0]   iu_dbg_addr,
  output logic [31:0]  iu_dbg_data,
  output logic [31:0]  iu_n_subbyte,
  output logic [31:0]  iu_n_shiftrow,
  output logic [31:0]  iu_n_mixcol,
  // AES first-round hardware
  input  logic         aes_in_valid,
  input  logic [127:0] aes_plain,
  input  logic [127:0] aes_key,
  output logic         aes_out_valid,
  output logic [127:0] aes_state,
  output logic [127:0] aes_rkey,
  // PRESENT-80
  input  logic         prs_start,
  input  logic [63:0]  prs_plaintext,
  input  logic [79:0]  prs_key,
  output logic         prs_busy,
  output logic         prs_done,
  output logic [63:0]  prs_ciphertext,
  // OR1200 l.cust5
  input  logic [31:0]  c5_insn,
  input  logic [31:0]  c5_a,
  input  logic [31:0]  c5_b,
  output logic         c5_is_cust5,
  output logic [4:0]   c5_rd,
  output logic [31:0]  c5_result
);

  leon3_ise_iu u_iu (
    .clk, .rst_n,
    .insn_valid (iu_insn_valid), .insn (iu_insn),
    .wb_valid (iu_wb_valid), .wb_rd (iu_wb_rd), .wb_data (iu_wb_data),
    .illegal (iu_illegal), .icc (iu_icc),
    .dbg_addr (iu_dbg_addr), .dbg_data (iu_dbg_data),
    .n_subbyte (iu_n_subbyte), .n_shiftrow (iu_n_shiftrow), .n_mixcol (iu_n_mixcol)
  );

  aes_round1 u_aes (
    .clk, .rst_n,
    .in_valid (aes_in_valid), .plain (aes_plain), .key (aes_key),
    .out_valid (aes_out_valid), .state_o (aes_state), .rkey_o (aes_rkey)
  );

  present80_core u_present (
    .clk, .rst_n,
    .start (prs_start), .plaintext (prs_plaintext), .key (prs_key),
    .busy (prs_busy), .done (prs_done), .ciphertext (prs_ciphertext)
  );

  or1200_cust5 u_cust5 (
    .insn (c5_insn), .a (c5_a), .b (c5_b),
    .is_cust5 (c5_is_cust5), .rd (c5_rd), .result (c5_result)
  );

endmodule
