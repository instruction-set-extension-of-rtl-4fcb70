// aes_round1: stand-alone hardware of the first AES-128 round.
//
// Computes, from a 128-bit plain text and cipher key,
//   s   = plain ^ key                              (initial AddRoundKey)
//   s   = SubByte, ShiftRow, MixColumn of s        (round 1)
//   out = s ^ rk1,  rk1 = aes_key_step(key, 1)     (AddRoundKey)
// with the same row and column datapaths the processor extension uses: four
// SubByte and four ShiftRow units work on the rows, four MixColumn units on
// the columns, and the row/column conversions between them are wiring.
// Bytes are in the usual order: byte k (bits 127-8k -: 8) is row k mod 4,
// column k div 4.  The round is one combinational path; the result and round
// key 1 are registered, so out_valid follows in_valid by one clock.
module aes_round1 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [127:0] plain,
  input  logic [127:0] key,
  output logic         out_valid,
  output logic [127:0] state_o,
  output logic [127:0] rkey_o
);

  logic [127:0] s0, rk1, s_mix;
  logic [31:0]  row   [4];
  logic [31:0]  row_s [4];
  logic [31:0]  row_r [4];
  logic [31:0]  col   [4];
  logic [31:0]  col_m [4];

  assign s0 = plain ^ key;

  // state (column-major bytes) to rows
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        row[r][31 - 8*c -: 8] = s0[127 - 8*(4*c + r) -: 8];
  end

  for (genvar r = 0; r < 4; r++) begin : g_rows
    aes_subbyte  u_sb (.row_i(row[r]),   .row_o(row_s[r]));
    aes_shiftrow u_sr (.row_i(row_s[r]), .shamt(2'(r)), .row_o(row_r[r]));
  end

  // rows to columns
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        col[c][31 - 8*r -: 8] = row_r[r][31 - 8*c -: 8];
  end

  for (genvar c = 0; c < 4; c++) begin : g_cols
    aes_mixcolumn u_mc (.col_i(col[c]), .col_o(col_m[c]));
    assign s_mix[127 - 32*c -: 32] = col_m[c];
  end

  aes_key_step u_key (.key_i(key), .round(4'd1), .key_o(rk1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      state_o   <= '0;
      rkey_o    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state_o <= s_mix ^ rk1;
        rkey_o  <= rk1;
      end
    end
  end

endmodule
