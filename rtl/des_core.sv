// des_core: DES encryption and decryption in the loop architecture. Only one
// round (des_round) and one key generator (des_keygen) exist in hardware; a
// 64-bit round register feeds the round output back to its input, so one
// 64-bit block takes 16 clock cycles, one per round.
//
// Datapath: the multiplexer in front of the round selects the initial
// permutation of a new block (cycle of start_i) or the registered output of
// the previous round (the 15 cycles after). The 16th round leaves the
// pre-output {R16, L16} in the register; dout_o is its final permutation and
// stays valid until the next start.
//
// Interface and timing: start_i is sampled while busy_o is low, together with
// din_i, key_i and decrypt_i (all three are only read in that cycle). busy_o
// is high for the 16 cycles of the computation and done_o pulses for one cycle
// when dout_o becomes valid, 16 cycles after the start cycle. At the 31.42 MHz
// of the reference FPGA implementation that is 31.42 MHz * 64 / 16 = 125.7
// Mbit/s. The loop structure, the mux and the 16-cycle latency follow the
// published design; the start/busy/done handshake is this design's own.
module des_core
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        decrypt_i,
  input  logic [63:0] key_i,
  input  block_t      din_i,
  output logic        busy_o,
  output logic        done_o,
  output block_t      dout_o
);
  block_t     lr_q, round_in, round_out;
  logic [3:0] rnd_q, rnd;
  logic       dec_q, dec;
  logic       go;
  subkey_t    subkey;

  assign go = start_i && !busy_o;

  // "mux" of the loop: new block or fed-back round output
  always_comb begin
    round_in = go ? ip(din_i) : lr_q;
    rnd      = go ? 4'd0 : rnd_q;
    dec      = go ? decrypt_i : dec_q;
  end

  des_keygen u_keygen (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_i    (go),
    .step_i    (busy_o),
    .key_i     (key_i),
    .decrypt_i (dec),
    .round_i   (rnd),
    .subkey_o  (subkey)
  );

  des_round u_round (
    .state_i  (round_in),
    .subkey_i (subkey),
    .last_i   (rnd == 4'd15),
    .state_o  (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lr_q   <= '0;
      rnd_q  <= '0;
      dec_q  <= 1'b0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (go || busy_o) begin
        lr_q  <= round_out;
        rnd_q <= rnd + 4'd1;
        dec_q <= dec;
        if (rnd == 4'(DES_ROUNDS - 1)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end else begin
          busy_o <= 1'b1;
        end
      end
    end
  end

  assign dout_o = fp(lr_q);

  // A start while busy is ignored; the host is expected to wait for done.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(start_i && busy_o));
endmodule
