// ppi_model: behavioural model of the board's IO controller, an 8255-type
// programmable peripheral interface, reduced to mode 0 for the testbenches.
// Register 0 is port A (output latch), 1 is port B (input pins pb_i), 2 is
// port C (output latch), 3 takes a control word: with bit 7 set it is a mode
// word and clears the output latches, with bit 7 clear it sets (bit 0 = 1) or
// resets the port C bit selected by bits 3:1. Writes are taken on clock edges
// while CS_n and WR_n are low; reads are combinational while CS_n and RD_n
// are low.
module ppi_model (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs_n_i,
  input  logic       rd_n_i,
  input  logic       wr_n_i,
  input  logic [1:0] a_i,
  input  logic [7:0] d_i,
  output logic [7:0] d_o,
  input  logic [7:0] pb_i,
  output logic [7:0] pa_o,
  output logic [7:0] pc_o
);
  logic [7:0] ctrl_q;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pa_o   <= '0;
      pc_o   <= '0;
      ctrl_q <= 8'h9B;
    end else if (!cs_n_i && !wr_n_i) begin
      case (a_i)
        2'd0: pa_o <= d_i;
        2'd2: pc_o <= d_i;
        2'd3: if (d_i[7]) begin
                ctrl_q <= d_i;
                pa_o   <= '0;
                pc_o   <= '0;
              end else begin
                pc_o[d_i[3:1]] <= d_i[0];
              end
        default: ;
      endcase
    end
  end

  always_comb begin
    d_o = 8'h00;
    if (!cs_n_i && !rd_n_i)
      case (a_i)
        2'd0: d_o = pa_o;
        2'd1: d_o = pb_i;
        2'd2: d_o = pc_o;
        default: d_o = ctrl_q;
      endcase
  end
endmodule
