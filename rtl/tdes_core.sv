// tdes_core: Triple-DES with a 112-bit key (two DES keys K1, K2 used as
// K1, K2, K1) in the loop architecture. The same single round and key
// generator as des_core are reused for all 48 rounds of the three DES passes,
// so a block takes 48 clock cycles.
//
// Encryption is E_K1(D_K2(E_K1(x))) and decryption D_K1(E_K2(D_K1(x))). The
// final and initial permutations between two passes cancel, so the round
// register simply carries the pre-output {R16, L16} of one pass into the next
// as its {L0, R0}; only the first pass applies IP and only the result applies
// FP. At the start of each pass the key generator is reloaded with that pass's
// key and direction.
//
// Interface and timing as des_core: start_i is taken while busy_o is low, with
// din_i, key1_i, key2_i and decrypt_i; done_o pulses 48 cycles later, when
// dout_o becomes valid. key1_i and key2_i are held in registers for the whole
// operation. At the 35.91 MHz of the reference FPGA implementation that is
// 35.91 MHz * 64 / 48 = 47.9 Mbit/s. 48 rounds, a 112-bit key and the loop
// structure follow the published design; keying option 2 (K3 = K1) and the EDE
// order are the usual Triple-DES definition, chosen here to match the 112 bits.
module tdes_core
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        decrypt_i,
  input  logic [63:0] key1_i,
  input  logic [63:0] key2_i,
  input  block_t      din_i,
  output logic        busy_o,
  output logic        done_o,
  output block_t      dout_o
);
  block_t      lr_q, round_in, round_out;
  logic [5:0]  rnd_q, rnd;
  logic [1:0]  pass;
  logic [3:0]  rnd_in_pass;
  logic        dec_q, dec_op, pass_dec;
  logic [63:0] k1_q, k2_q, k1, k2, pass_key;
  logic        go;
  subkey_t     subkey;

  assign go = start_i && !busy_o;

  always_comb begin
    round_in    = go ? ip(din_i) : lr_q;
    rnd         = go ? 6'd0 : rnd_q;
    dec_op      = go ? decrypt_i : dec_q;
    k1          = go ? key1_i : k1_q;
    k2          = go ? key2_i : k2_q;
    pass        = rnd[5:4];             // 0, 1, 2
    rnd_in_pass = rnd[3:0];
    // middle pass runs in the opposite direction and uses K2
    pass_dec    = (pass == 2'd1) ? !dec_op : dec_op;
    pass_key    = (pass == 2'd1) ? k2 : k1;
  end

  des_keygen u_keygen (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_i    ((go || busy_o) && rnd_in_pass == 4'd0),
    .step_i    (busy_o && rnd_in_pass != 4'd0),
    .key_i     (pass_key),
    .decrypt_i (pass_dec),
    .round_i   (rnd_in_pass),
    .subkey_o  (subkey)
  );

  des_round u_round (
    .state_i  (round_in),
    .subkey_i (subkey),
    .last_i   (rnd_in_pass == 4'd15),
    .state_o  (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lr_q   <= '0;
      rnd_q  <= '0;
      dec_q  <= 1'b0;
      k1_q   <= '0;
      k2_q   <= '0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (go || busy_o) begin
        lr_q  <= round_out;
        rnd_q <= rnd + 6'd1;
        dec_q <= dec_op;
        k1_q  <= k1;
        k2_q  <= k2;
        if (rnd == 6'(TDES_ROUNDS - 1)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end else begin
          busy_o <= 1'b1;
        end
      end
    end
  end

  assign dout_o = fp(lr_q);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(start_i && busy_o));
endmodule
