// sram_model: behavioural model of a 512K x 8 asynchronous static RAM for the
// testbenches (the board's SRAM is a catalogue part, not part of the RTL).
// Reads are combinational: while CS_n and OE_n are low, d_o shows the byte at
// the address (0 otherwise). A write happens on each clock edge at which CS_n
// and WE_n are low. The array can also be reached directly by the testbench
// (mem) to preload large images.
module sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] a_i,
  input  logic          cs_n_i,
  input  logic          oe_n_i,
  input  logic          we_n_i,
  input  logic [7:0]    d_i,
  output logic [7:0]    d_o
);
  logic [7:0] mem [2**AW];

  initial foreach (mem[i]) mem[i] = 8'h00;

  assign d_o = (!cs_n_i && !oe_n_i) ? mem[a_i] : 8'h00;

  always @(posedge clk) if (!cs_n_i && !we_n_i) mem[a_i] <= d_i;
endmodule
