// graph_mem: on-chip monitoring graph memory.
//
// DEPTH rows of 32 bits with one write port (graph loading) and NRD
// independent synchronous read ports: the data for the address presented in
// one cycle appears after the next clock edge. The monitors present the
// address of the entry they will need next, so one lookup per instruction is
// enough. The contents are not reset. The document gives the 32-bit row and
// the sizes (16K rows in the single-core prototype, 303,104 bits per memory
// in the multi-core one); several read ports, so that two cores can run the
// same program at once, are this design's choice.
module graph_mem #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = 14,
  parameter int unsigned NRD   = 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [31:0]         wdata,
  input  logic [AW-1:0]       raddr [NRD],
  output logic [31:0]         rdata [NRD]
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    for (int p = 0; p < NRD; p++) begin
      rdata[p] <= (32'(raddr[p]) < DEPTH) ? mem[raddr[p]] : '0;
    end
  end

endmodule
