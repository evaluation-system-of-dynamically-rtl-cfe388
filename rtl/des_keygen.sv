// des_keygen: the "key generator" of the loop architecture. It produces one
// 48-bit round key per clock for a 16-round DES pass, forward for encryption
// or in reverse order for decryption, without storing a table of 16 keys.
//
// Operation: on load_i the 64-bit key (parity bits ignored) goes through PC-1
// into the 56-bit {C, D} value; otherwise the registered {C, D} is used. For
// encryption both halves are rotated left by the standard's amount for round
// round_i and the rotated value feeds PC-2 and is stored. For decryption the
// current value feeds PC-2 directly (K16 = PC-2(C0, D0), because the 16 left
// rotations add up to 28 places) and is then rotated right by the amount of
// the round being undone, which walks back through K15 ... K1.
//
// Interface: round_i is the round number within the pass (0 = first round)
// and is supplied by the core, which also asserts load_i in the first round
// of every pass and step_i in the others. subkey_o is combinational and is
// consumed in the same cycle. The rotation scheme is this design's choice;
// PC-1, PC-2 and the rotation schedule are the standard's.
module des_keygen
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,     // first round of a pass: take key_i
  input  logic        step_i,     // later round of a pass: advance {C, D}
  input  logic [63:0] key_i,      // DES key with parity bits
  input  logic        decrypt_i,  // 1: produce keys in reverse order
  input  logic [3:0]  round_i,    // round number within the pass, 0..15
  output subkey_t     subkey_o
);
  logic [55:0] cd_q, cd_src, cd_next;
  int unsigned sh_enc, sh_dec;

  always_comb begin
    cd_src = load_i ? pc1(key_i) : cd_q;
    sh_enc = int'(SHIFT_T[round_i]);
    sh_dec = int'(SHIFT_T[4'd15 - round_i]);
    if (decrypt_i) begin
      subkey_o = pc2(cd_src);
      cd_next  = {rotr28(cd_src[55:28], sh_dec), rotr28(cd_src[27:0], sh_dec)};
    end else begin
      cd_next  = {rotl28(cd_src[55:28], sh_enc), rotl28(cd_src[27:0], sh_enc)};
      subkey_o = pc2(cd_next);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cd_q <= '0;
    else if (load_i || step_i)  cd_q <= cd_next;
  end
endmodule
