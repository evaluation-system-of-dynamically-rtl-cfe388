// des_round: one round of the DES Feistel network, the "f function" box of
// the loop architecture together with the XOR and the exchange of halves.
//
// The 64-bit state is {L, R}. The round returns {R, L ^ f(R, K)}, where f is
// expansion E, XOR with the 48-bit round key, the eight S-boxes and the
// permutation P (des_pkg::f_func). In the last round of a 16-round DES pass
// the halves are not exchanged (last = 1), so the result is the pre-output
// block {R16, L16} that the final permutation, or the next DES pass of
// Triple-DES, takes as it is.
//
// Purely combinational; the loop cores register its output once per clock,
// so one round is computed per cycle. The round structure is the standard's;
// the "last" input that folds the final exchange into the round is this
// design's choice.
module des_round
  import des_pkg::*;
(
  input  block_t  state_i,   // {L, R} entering the round
  input  subkey_t subkey_i,  // round key K_i
  input  logic    last_i,    // 1: final round of a DES pass, no exchange
  output block_t  state_o    // {L, R} leaving the round
);
  logic [31:0] l, r, r_new;

  always_comb begin
    l     = state_i[63:32];
    r     = state_i[31:0];
    r_new = l ^ f_func(r, subkey_i);
    state_o = last_i ? {r_new, r} : {r, r_new};
  end
endmodule
