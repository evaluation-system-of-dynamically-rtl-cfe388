// sebsw1: board logic of a PCI encryption/decryption card whose cipher can be
// exchanged at run time by reloading its FPGA. The host keeps a library of
// FPGA images in the on-board SRAM; to switch algorithm it asserts the
// configuration signal through the IO controller, the local bus controller
// streams the chosen image from SRAM into the FPGA, and the FPGA raises DONE
// with the new cipher in place. Data and keys are then written to the FPGA's
// register window, and the result read back, over the same 8-bit local bus.
//
// This module wires the two blocks that are logic of the board itself:
//   lbus_ctrl    local bus controller (bus strobes and FPGA configuration)
//   crypto_fpga  the FPGA slot with the DES / Triple-DES loop cores
// The PCI controller (host side of the local bus), the 512K x 8 SRAM and the
// IO controller are standard parts and stay outside: their signals are this
// module's ports. fpga_done_o is meant to be read back by the host through an
// input port of the IO controller.
//
// Clock: one 16 MHz local-bus clock for everything on the board; rst_n is an
// asynchronous active-low reset. The parameters are passed through to the
// blocks; their defaults are the reference board's sizes (512K x 8 SRAM,
// XCV300 image of 218,976 bytes). See lbus_ctrl for the host-visible register
// map and timing.
module sebsw1
  import des_pkg::*;
#(
  parameter int unsigned SRAM_AW     = 19,
  parameter int unsigned CFG_BYTES   = 218_976,
  parameter int unsigned INIT_CYCLES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // PCI controller local-bus side
  input  logic               hs_req_i,
  input  logic               hs_wr_i,
  input  logic [5:0]         hs_addr_i,
  input  logic [7:0]         hs_wdata_i,
  output logic [7:0]         hs_rdata_o,
  output logic               hs_ack_o,
  output logic               hs_ready_o,
  // SRAM (512K x 8, asynchronous)
  output logic [SRAM_AW-1:0] sram_a_o,
  output logic               sram_cs_n_o,
  output logic               sram_oe_n_o,
  output logic               sram_we_n_o,
  output logic [7:0]         sram_d_o,
  input  logic [7:0]         sram_d_i,
  // IO controller
  output logic               io_cs_n_o,
  output logic               io_rd_n_o,
  output logic               io_wr_n_o,
  output logic [1:0]         io_a_o,
  output logic [7:0]         io_d_o,
  input  logic [7:0]         io_d_i,
  input  logic               cfg_req_i,
  // FPGA status
  output logic               fpga_done_o,
  output logic               cfg_busy_o,
  output alg_e               alg_o
);
  logic       fpga_cs, fpga_wr;
  logic [4:0] fpga_a;
  logic [7:0] fpga_wdata, fpga_rdata;
  logic       program_n, cfg_cs_n, cfg_write_n, init_n, done;
  logic [7:0] cfg_d;

  lbus_ctrl #(.SRAM_AW(SRAM_AW)) u_lbc (
    .clk(clk), .rst_n(rst_n),
    .hs_req_i(hs_req_i), .hs_wr_i(hs_wr_i), .hs_addr_i(hs_addr_i),
    .hs_wdata_i(hs_wdata_i), .hs_rdata_o(hs_rdata_o), .hs_ack_o(hs_ack_o), .hs_ready_o(hs_ready_o),
    .sram_a_o(sram_a_o), .sram_cs_n_o(sram_cs_n_o), .sram_oe_n_o(sram_oe_n_o),
    .sram_we_n_o(sram_we_n_o), .sram_d_o(sram_d_o), .sram_d_i(sram_d_i),
    .io_cs_n_o(io_cs_n_o), .io_rd_n_o(io_rd_n_o), .io_wr_n_o(io_wr_n_o),
    .io_a_o(io_a_o), .io_d_o(io_d_o), .io_d_i(io_d_i), .cfg_req_i(cfg_req_i),
    .fpga_cs_o(fpga_cs), .fpga_wr_o(fpga_wr), .fpga_a_o(fpga_a),
    .fpga_wdata_o(fpga_wdata), .fpga_rdata_i(fpga_rdata),
    .program_n_o(program_n), .cfg_cs_n_o(cfg_cs_n), .cfg_write_n_o(cfg_write_n),
    .cfg_d_o(cfg_d), .init_n_i(init_n), .done_i(done),
    .cfg_busy_o(cfg_busy_o)
  );

  crypto_fpga #(.CFG_BYTES(CFG_BYTES), .INIT_CYCLES(INIT_CYCLES)) u_fpga (
    .clk(clk), .rst_n(rst_n),
    .program_n_i(program_n), .cfg_cs_n_i(cfg_cs_n), .cfg_write_n_i(cfg_write_n),
    .cfg_d_i(cfg_d), .init_n_o(init_n), .done_o(done),
    .bus_cs_i(fpga_cs), .bus_wr_i(fpga_wr), .bus_a_i(fpga_a),
    .bus_wdata_i(fpga_wdata), .bus_rdata_o(fpga_rdata),
    .alg_o(alg_o)
  );

  assign fpga_done_o = done;
endmodule
