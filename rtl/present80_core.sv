// present80_core: iterative hardware PRESENT-80 encryption.
//
// Encrypts a 64-bit block with an 80-bit key in ROUNDS (31) identical rounds,
// one round per clock:
//   state <- pLayer(sBoxLayer(state ^ K[79:16])),  K <- KeyTransform(K, i)
// for round counter i = 1..31, followed by a last addRoundKey with the 32nd
// round key, which is applied combinationally on the ciphertext output.
//
// Handshake: a start pulse while idle loads plaintext and key (that edge is
// the load cycle); busy is high during the rounds; done rises ROUNDS clocks
// after the load edge and stays high, with ciphertext valid, until the next
// start.  Start while busy is ignored.  The round-per-clock structure is
// this design's choice.
module present80_core #(
  parameter int unsigned ROUNDS = 31
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] plaintext,
  input  logic [79:0] key,
  output logic        busy,
  output logic        done,
  output logic [63:0] ciphertext
);

  logic [63:0] state_q, sb_out, pl_out;
  logic [79:0] key_q, key_nxt;
  logic [4:0]  rnd_q;

  present_sbox_layer u_sbox (.d_i(state_q ^ key_q[79:16]), .d_o(sb_out));
  present_player     u_perm (.d_i(sb_out), .d_o(pl_out));
  present_key_update u_key  (.key_i(key_q), .round_counter(rnd_q), .key_o(key_nxt));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= '0;
      rnd_q   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else if (busy) begin
      state_q <= pl_out;
      key_q   <= key_nxt;
      rnd_q   <= rnd_q + 5'd1;
      if (32'(rnd_q) == ROUNDS) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else if (start) begin
      state_q <= plaintext;
      key_q   <= key;
      rnd_q   <= 5'd1;
      busy    <= 1'b1;
      done    <= 1'b0;
    end
  end

  assign ciphertext = state_q ^ key_q[79:16];

  // busy and done never overlap; a round counter outside 1..ROUNDS means a
  // broken sequence
  a_busy_done: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  a_round_rng: assert property (@(posedge clk) disable iff (!rst_n)
                                busy |-> (rnd_q >= 5'd1 && 32'(rnd_q) <= ROUNDS));

endmodule
