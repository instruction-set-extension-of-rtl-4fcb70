// aes_subbyte: datapath of the SubByte instruction (new_ins_1, op3 = 0x0D).
//
// Substitutes each of the four bytes of one 32-bit state row through its own
// copy of the AES S-box.  The row is packed with column 0 in bits 31:24.
// Combinational; it sits in the execute stage next to the ordinary logic
// operations, so the instruction has the same one-cycle latency as AND.
module aes_subbyte (
  input  logic [31:0] row_i,
  output logic [31:0] row_o
);

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte  (row_i[8*i +: 8]),
      .out_byte (row_o[8*i +: 8])
    );
  end

endmodule
