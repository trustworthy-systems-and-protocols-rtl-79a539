// base_addr_rf: group base address register file of the monitors.
//
// Sixteen 16-bit registers hold the start address of each group of graph
// states. They are loaded from the header of a graph, two per 32-bit row:
// row r writes group 2r+1 (1-based) from bits [31:16] and group 2r+2 from
// bits [15:0]; registers are numbered from 0 here. Reads are combinational.
// Sixteen registers loaded through the graph-memory read data follow the
// document; the packing of two groups per row follows its figure of the
// graph memory, and the half-word order is this design's choice.
// Reset clears all registers.
module base_addr_rf
  import mon_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [2:0]         wr_row,
  input  logic [ROW_W-1:0]   wr_data,
  input  logic [3:0]         rd_sel,
  output logic [GADDR_W-1:0] rd_base
);

  logic [GADDR_W-1:0] base_q [NGROUP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NGROUP; i++) base_q[i] <= '0;
    end else if (we) begin
      base_q[{wr_row, 1'b0}] <= wr_data[31:16];
      base_q[{wr_row, 1'b1}] <= wr_data[15:0];
    end
  end

  assign rd_base = base_q[rd_sel];

endmodule
