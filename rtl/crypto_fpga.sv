// crypto_fpga: the reconfigurable cipher slot of the board, i.e. the FPGA
// (an XCV300 in the reference board) as seen from the local bus. It combines
// three parts:
//
//  * A SelectMAP-style configuration port. PROGRAM_n low clears the slot and
//    pulls INIT_n low; INIT_n is released INIT_CYCLES clocks after PROGRAM_n
//    returns high. Then one configuration byte is taken on every rising clock
//    edge (CCLK is the local-bus clock) while CS_n and WRITE_n are low. When
//    CFG_BYTES bytes have arrived, DONE goes high and the loaded cipher
//    becomes active. Real FPGA reconfiguration cannot be expressed as RTL, so
//    this slot holds every library entry (DES and Triple-DES loop cores) and
//    the image selects one: its first byte is the algorithm identifier
//    (des_pkg::alg_e, 1 = DES, 2 = Triple-DES). An unknown identifier is
//    treated like a failed load: INIT_n is pulled low and DONE stays low.
//  * The cipher library entries: des_core and tdes_core. Only the active one
//    is started; both are held in reset while the slot is not configured, so
//    a reconfiguration wipes all cipher state.
//  * A byte-wide register window on the 8-bit local bus (bus_a_i is the
//    offset inside the window, reads are combinational):
//      0x00-0x07  block: write the input block, read the result (byte 0 = MSB)
//      0x08-0x0F  key 1 (64 bits with parity, byte 0 = MSB)
//      0x10-0x17  key 2 (Triple-DES only)
//      0x18       control, write: bit 0 start, bit 1 decrypt
//      0x19       status, read: bit 0 busy, bit 1 result valid,
//                 bits 5:4 active algorithm (alg_e)
//
// Timing: a start written in cycle t enters the core in cycle t+1; the result
// is valid 16 (DES) or 48 (Triple-DES) cycles later. The configuration
// sequence, DONE and the one-byte-per-CCLK load follow the board description
// (SelectMAP mode, DONE raised at the end of configuration). The image
// header, the register map and the INIT_n behaviour are this design's own.
module crypto_fpga
  import des_pkg::*;
#(
  parameter int unsigned CFG_BYTES   = 218_976,  // XCV300 bitstream, bytes
  parameter int unsigned INIT_CYCLES = 32        // configuration clear time
) (
  input  logic       clk,
  input  logic       rst_n,
  // SelectMAP configuration port
  input  logic       program_n_i,
  input  logic       cfg_cs_n_i,
  input  logic       cfg_write_n_i,
  input  logic [7:0] cfg_d_i,
  output logic       init_n_o,
  output logic       done_o,
  // local-bus register window
  input  logic       bus_cs_i,
  input  logic       bus_wr_i,
  input  logic [4:0] bus_a_i,
  input  logic [7:0] bus_wdata_i,
  output logic [7:0] bus_rdata_o,
  // active library entry, for observation
  output alg_e       alg_o
);
  typedef enum logic [1:0] {CLEAR, LOAD, DONE, FAIL} cfg_state_e;

  localparam int unsigned CW = $clog2(CFG_BYTES + 1);
  localparam int unsigned IW = $clog2(INIT_CYCLES + 1);

  cfg_state_e     st_q;
  logic [CW-1:0]  nbytes_q;
  logic [IW-1:0]  init_cnt_q;
  alg_e           alg_q, alg_hdr_q;
  logic           done_q;
  logic           byte_in;

  assign byte_in = !cfg_cs_n_i && !cfg_write_n_i;

  // ---------------------------------------------------------------- config
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= CLEAR;
      nbytes_q   <= '0;
      init_cnt_q <= '0;
      alg_q      <= ALG_NONE;
      alg_hdr_q  <= ALG_NONE;
      done_q     <= 1'b0;
    end else if (!program_n_i) begin
      st_q       <= CLEAR;
      nbytes_q   <= '0;
      init_cnt_q <= '0;
      alg_q      <= ALG_NONE;
      done_q     <= 1'b0;
    end else begin
      unique case (st_q)
        CLEAR: begin
          if (init_cnt_q == IW'(INIT_CYCLES)) st_q <= LOAD;
          else init_cnt_q <= init_cnt_q + 1'b1;
        end
        LOAD: if (byte_in) begin
          nbytes_q <= nbytes_q + 1'b1;
          if (nbytes_q == '0) begin
            unique case (cfg_d_i)
              8'h01:   alg_hdr_q <= ALG_DES;
              8'h02:   alg_hdr_q <= ALG_TDES;
              default: begin
                alg_hdr_q <= ALG_NONE;
                st_q      <= FAIL;
              end
            endcase
          end
          if (nbytes_q == CW'(CFG_BYTES - 1)) begin
            st_q   <= DONE;
            alg_q  <= alg_hdr_q;
            done_q <= 1'b1;
          end
        end
        DONE, FAIL: ;  // further bytes are ignored until PROGRAM_n
      endcase
    end
  end

  assign init_n_o = (st_q == LOAD) || (st_q == DONE);
  assign done_o   = done_q;
  assign alg_o    = alg_q;

  // --------------------------------------------------------- cipher library
  logic        user_rst_n;
  logic [63:0] blk_q, key1_q, key2_q;
  logic        start_q, dec_q, valid_q;
  logic        des_busy, des_done, tdes_busy, tdes_done;
  block_t      des_out, tdes_out, result;

  // the user logic is held in reset by a register (DONE), never by a decode
  assign user_rst_n = rst_n && done_q;

  des_core u_des (
    .clk(clk), .rst_n(user_rst_n),
    .start_i(start_q && alg_q == ALG_DES), .decrypt_i(dec_q),
    .key_i(key1_q), .din_i(blk_q),
    .busy_o(des_busy), .done_o(des_done), .dout_o(des_out)
  );

  tdes_core u_tdes (
    .clk(clk), .rst_n(user_rst_n),
    .start_i(start_q && alg_q == ALG_TDES), .decrypt_i(dec_q),
    .key1_i(key1_q), .key2_i(key2_q), .din_i(blk_q),
    .busy_o(tdes_busy), .done_o(tdes_done), .dout_o(tdes_out)
  );

  assign result = (alg_q == ALG_TDES) ? tdes_out : des_out;

  // ------------------------------------------------------ register window
  logic busy;
  assign busy = des_busy || tdes_busy || start_q;

  always_ff @(posedge clk or negedge user_rst_n) begin
    if (!user_rst_n) begin
      blk_q   <= '0;
      key1_q  <= '0;
      key2_q  <= '0;
      start_q <= 1'b0;
      dec_q   <= 1'b0;
      valid_q <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (des_done || tdes_done) valid_q <= 1'b1;
      if (bus_cs_i && bus_wr_i && !busy) begin
        unique case (bus_a_i[4:3])
          2'd0: blk_q [8*(7-bus_a_i[2:0]) +: 8] <= bus_wdata_i;
          2'd1: key1_q[8*(7-bus_a_i[2:0]) +: 8] <= bus_wdata_i;
          2'd2: key2_q[8*(7-bus_a_i[2:0]) +: 8] <= bus_wdata_i;
          2'd3: if (bus_a_i[2:0] == 3'd0) begin
            start_q <= bus_wdata_i[0];
            dec_q   <= bus_wdata_i[1];
            if (bus_wdata_i[0]) valid_q <= 1'b0;
          end
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata_o = 8'h00;
    unique case (bus_a_i[4:3])
      2'd0: bus_rdata_o = result[8*(7-bus_a_i[2:0]) +: 8];
      2'd1: bus_rdata_o = key1_q[8*(7-bus_a_i[2:0]) +: 8];
      2'd2: bus_rdata_o = key2_q[8*(7-bus_a_i[2:0]) +: 8];
      2'd3: if (bus_a_i[2:0] == 3'd1)
              bus_rdata_o = {2'b00, alg_q, 2'b00, valid_q, busy};
    endcase
  end
endmodule
